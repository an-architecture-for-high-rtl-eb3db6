2468
37bf
4b16
5e6d
71c4
851b
9872
abc9
bf20
d277
e5ce
f925
0c7c
1fd3
332a
4681
59d8
6d2f
8086
93dd
a734
ba8b
cde2
e139
f490
07e7
1b3e
2e95
41ec
5543
689a
7bf1
8f48
a29f
b5f6
c94d
dca4
effb
0352
16a9
2a00
3d57
50ae
6405
775c
8ab3
9e0a
b161
c4b8
d80f
eb66
febd
1214
256b
38c2
4c19
5f70
72c7
861e
9975
accc
c023
d37a
e6d1
