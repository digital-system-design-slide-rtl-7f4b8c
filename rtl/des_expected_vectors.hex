0123456789abcdef
8787878787878787
4e6f772069732074
8000000000000000
01a1d6d039776742
5cd54ca83def57da
2e03d6fecd704dbf
5028d24cabb247ed
