780101
780241
780301
78040f
780500
280503
780600
280602
0a0601
880601
028180
911202
388081
388180
388081
0a0601
0a0501
930904
080201
080301
0a0401
930404
931600
