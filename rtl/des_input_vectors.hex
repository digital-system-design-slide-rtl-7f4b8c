133457799bbcdff185e813540f0ab405
0e329232ea6d0d730000000000000000
0123456789abcdef3fa40e8a984d4815
010101010101010195f8a5e5dd31d900
7ca110454a1a6e57690f5b0d9a26939b
0131d9619dc1376e7a389d10354bd271
5ce7c2c8e3d3451284919c8ef386277f
d892874c66cb7e572b96a677517bc7ff
