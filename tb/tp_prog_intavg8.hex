780340
880301
780000
780100
780200
080180
0c0200
080181
0c0200
080182
0c0200
080183
0c0200
080184
0c0200
080185
0c0200
080186
0c0200
080187
0c0200
080188
0c0200
080189
0c0200
08018a
0c0200
08018b
0c0200
08018c
0c0200
08018d
0c0200
08018e
0c0200
08018f
0c0200
100000
6c0202
6c0101
6c0202
6c0101
6c0202
6c0101
6c0202
6c0101
782000
282001
933000
