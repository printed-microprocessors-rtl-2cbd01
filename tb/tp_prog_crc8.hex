780000
780101
780507
782200
780240
780310
880201
382280
780408
100000
5c2222
930d02
382205
0a0401
930904
080201
0a0301
930604
931200
