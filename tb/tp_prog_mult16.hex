780000
780101
780210
781200
781300
780400
780300
280310
780500
280511
680505
930e02
081203
0c1304
100000
5c0303
5c0404
0a0201
930a04
931300
