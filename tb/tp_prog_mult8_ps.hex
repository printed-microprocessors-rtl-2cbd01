1e000
1e021
1e048
1e240
1e260
1e080
1e060
0a070
1e0a0
0a0b1
1a0a5
24dc2
02243
03264
04000
17063
17084
02841
24d44
24e60
