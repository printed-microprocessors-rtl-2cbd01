780440
880401
780000
780100
780200
780300
080180
0c0281
0c0300
080182
0c0283
0c0300
080184
0c0285
0c0300
080186
0c0287
0c0300
080188
0c0289
0c0300
08018a
0c028b
0c0300
08018c
0c028d
0c0300
08018e
0c028f
0c0300
080190
0c0291
0c0300
080192
0c0293
0c0300
080194
0c0295
0c0300
080196
0c0297
0c0300
080198
0c0299
0c0300
08019a
0c029b
0c0300
08019c
0c029d
0c0300
08019e
0c029f
0c0300
100000
6c0303
6c0202
6c0101
6c0303
6c0202
6c0101
6c0303
6c0202
6c0101
6c0303
6c0202
6c0101
782000
282001
782100
282102
934700
