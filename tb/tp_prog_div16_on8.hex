780000
780101
780210
781a00
781b00
781800
281810
781900
281911
100000
5c1818
5c1919
5c1a1a
5c1b1b
911202
021a14
061b15
931502
0a1a14
0e1b15
281801
0a0201
930904
931700
