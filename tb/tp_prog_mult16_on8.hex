780000
780101
780210
781800
781900
781a00
781b00
780600
780700
780400
280410
780500
280511
780800
280814
780900
280915
100000
6c0909
6c0808
931902
081804
0c1905
0c1a06
0c1b07
100000
5c0404
5c0505
5c0606
5c0707
0a0201
931104
932000
