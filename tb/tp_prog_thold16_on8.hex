780101
780402
780240
780310
782100
880201
023080
063181
910a02
082101
080204
0a0301
930504
930d00
