7818ff
781900
780266
021102
91a202
7802af
021202
915502
780241
021402
913002
780265
021002
911f02
7802ad
021002
911802
78023d
021002
911602
781805
93fe00
781802
93fe00
780286
021102
911d02
78180f
93fe00
78180c
93fe00
7802f6
021102
912902
7802cf
021202
912702
781809
93fe00
781806
93fe00
780218
021302
912e02
781803
93fe00
781800
93fe00
7802ae
021102
914402
78023f
021202
913d02
780261
021402
913b02
78180d
93fe00
78180a
93fe00
7802aa
021502
914202
781807
93fe00
781804
93fe00
780288
021302
914e02
7802f3
021602
914c02
781801
93fe00
78180e
93fe00
78023c
021702
915302
78180b
93fe00
781808
93fe00
78028a
021502
917d02
7802f7
021202
916c02
7802d1
021402
916502
780285
021002
916302
781805
93fe00
781802
93fe00
7802ce
021102
916a02
78180f
93fe00
78180c
93fe00
78021a
021502
917602
780217
021202
917402
781809
93fe00
781806
93fe00
780260
021302
917b02
781803
93fe00
781800
93fe00
780240
021302
919102
780263
021602
918a02
7802a9
021402
918802
78180d
93fe00
78180a
93fe00
7802f2
021502
918f02
781807
93fe00
781804
93fe00
7802ac
021702
919b02
78023b
021602
919902
781801
93fe00
78180e
93fe00
780284
021702
91a002
78180b
93fe00
781808
93fe00
7802f8
021302
91d902
7802d3
021602
91c802
780289
021402
91bc02
7802f5
021002
91b502
7802cd
021002
91b302
781805
93fe00
781802
93fe00
780216
021102
91ba02
78180f
93fe00
78180c
93fe00
78023e
021102
91c602
78025f
021202
91c402
781809
93fe00
781806
93fe00
78180c
93fe00
7802d2
021502
91d202
780287
021202
91d002
781809
93fe00
781806
93fe00
7802d0
021302
91d702
781803
93fe00
781800
93fe00
78021c
021702
91ed02
78021b
021602
91e602
780219
021402
91e402
78180d
93fe00
78180a
93fe00
780262
021502
91eb02
781807
93fe00
781804
93fe00
780264
021702
91f702
7802ab
021602
91f502
781801
93fe00
78180e
93fe00
7802f4
021702
91fc02
78180b
93fe00
781808
93fe00
781901
93ff00
