780101
780240
780310
782100
880201
023080
910802
082101
080201
0a0301
930404
930b00
