5a5a5a
c46da3
6635a8
80fdb1
2285be
4d4d87
ef158c
09dd95
abe592
d5ad9b
7475e0
963de9
30c5f6
528dff
fd55c4
1f1dcd
b925ca
dbfdd3
45b5d8
e44e21
06052e
a0dc37
c2953c
6caa05
8f6502
293c0b
4bf510
f58e19
144566
b61c6f
d0d574
72e27d
9ca57a
3f6c43
591548
fbde51
65855e
844ca7
2672ac
403ab5
e2e4b2
0cacbb
af5680
c91e89
6bc496
958c9f
37bae4
5662ed
f024ea
12dcf3
bc96f8
df4ec1
7904ce
9b3cd7
05f2dc
a7ab25
c66422
601f2b
82d630
2c8f39
4f4406
e9730f
0b2a14
b5e31d
d7a41a
766f63
903668
32ff71
5cc47e
fe8b47
19524c
bb1b55
25e452
47af5b
e677a0
003fa9
a20bb6
ccd3bf
6e9b84
89638d
2b278a
55ff93
f7b798
118fe1
b043ee
d21bf7
7cd3fc
9eabc5
3967c2
5b3fcb
c5f7d0
67cfd9
819b26
20522f
422b34
ece03d
0ea73a
a96e03
cb5708
751811
97c31e
318a67
50736c
f23875
1ce772
beae7b
d89740
7b4049
e50b56
07f25f
a1b8a4
c060ad
6226aa
8c1eb3
2ed0b8
488881
eb428e
153a97
b7f09c
d1a8e5
7066e2
925eeb
3c08f0
5ec0f9
f8bac6
1b72cf
8528d4
27e0dd
41a6da
e3e923
023028
ac7931
ce823e
68c907
8b100c
355915
576612
f1b11b
13f860
b20169
dc4a76
7e917f
98d844
3ae14d
a5264a
c77953
61b058
83c9a1
2201ae
4c59b7
ee91bc
08a985
aaf982
d5318b
774990
918199
33d9e6
5211ef
fc29f4
1e61fd
b8a1fa
dae9c3
4511c8
e759d1
0181de
a3c827
cdf12c
6c2635
8e6932
28903b
4ad900
f50209
174916
b1701f
d3b964
7de66d
9c216a
3e5873
589178
faca41
65014e
873857
21715c
43a6a5
edd8a2
0c10ab
ae4ab0
c882b9
6ab886
94f08f
372e94
51669d
f3a09a
1de8e3
bc32e8
de7af1
7840fe
9a88c7
04decc
a726d5
c168d2
63b0db
8dfa20
2fc329
4e0836
e8573f
0a9e04
b4e70d
d7200a
717b13
93b218
3d8b61
5fc06e
fe1777
186e7c
baa745
24f842
47334b
e10a50
034359
ad9fa6
cfd7af
6e2fb4
8867bd
2aa3ba
54eb83
f6d388
111b91
b34f9e
ddb7e7
7fffec
9e27f5
386bf2
5a53fb
c49bc0
66c3c9
810fd6
2377df
4dbf24
efe42d
0e232a
a81a33
ca5338
748401
96ff0e
313617
536f1c
fda465
1f9b62
b9d26b
d80b70
7a4479
e4bf46
06f64f
a12f54
c3645d
