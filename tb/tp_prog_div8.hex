780000
780101
780208
781300
781200
281210
100000
5c1212
5c1313
910c02
021311
930e02
0a1311
281201
0a0201
930604
931000
