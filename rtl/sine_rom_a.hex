0000
00c9
0192
025b
0324
03ed
04b6
057f
0648
0711
07da
08a3
096c
0a35
0afe
0bc7
0c90
0d58
0e21
0eea
0fb3
107b
1144
120d
12d5
139e
1466
152e
15f7
16bf
1787
184f
1918
19e0
1aa8
1b70
1c37
1cff
1dc7
1e8f
1f56
201e
20e5
21ac
2274
233b
2402
24c9
2590
2657
271e
27e4
28ab
2971
2a38
2afe
2bc4
2c8a
2d50
2e16
2edc
2fa1
3067
312c
31f1
32b6
337b
3440
3505
35ca
368e
3753
3817
38db
399f
3a63
3b26
3bea
3cad
3d71
3e34
3ef7
3fb9
407c
413f
4201
42c3
4385
4447
4509
45ca
468c
474d
480e
48cf
498f
4a50
4b10
4bd0
4c90
4d50
4e10
4ecf
4f8e
504d
510c
51cb
5289
5347
5405
54c3
5581
563e
56fb
57b8
5875
5932
59ee
5aaa
5b66
5c22
5cdd
5d98
5e53
5f0e
5fc9
6083
613d
61f7
62b1
636a
6423
64dc
6595
664d
6706
67bd
6875
692d
69e4
6a9b
6b51
6c08
6cbe
6d74
6e29
6edf
6f94
7049
70fd
71b2
7266
7319
73cd
7480
7533
75e5
7698
774a
77fc
78ad
795e
7a0f
7ac0
7b70
7c20
7cd0
7d7f
7e2e
7edd
7f8b
803a
80e7
8195
8242
82ef
839c
8448
84f4
85a0
864b
86f6
87a1
884b
88f5
899f
8a48
8af1
8b9a
8c42
8cea
8d92
8e39
8ee0
8f87
902d
90d3
9179
921e
92c3
9368
940c
94b0
9553
95f6
9699
973b
97dd
987f
9920
99c1
9a62
9b02
9ba2
9c41
9ce1
9d7f
9e1e
9ebb
9f59
9ff6
a093
a12f
a1cb
a267
a302
a39d
a437
a4d2
a56b
a604
a69d
a736
a7ce
a865
a8fd
a993
aa2a
aac0
ab55
abeb
ac7f
ad14
ada8
ae3b
aece
af61
aff3
b085
b116
b1a7
b238
b2c8
b358
b3e7
b476
b504
b592
b620
b6ad
b739
b7c6
b851
b8dd
b968
b9f2
ba7c
bb05
bb8e
bc17
bc9f
bd27
bdae
be35
bebb
bf41
bfc7
c04c
c0d0
c154
c1d8
c25b
c2dd
c360
c3e1
c462
c4e3
c563
c5e3
c663
c6e1
c760
c7de
c85b
c8d8
c954
c9d0
ca4c
cac7
cb41
cbbb
cc35
ccae
cd26
cd9e
ce16
ce8d
cf03
cf79
cfef
d064
d0d8
d14c
d1c0
d233
d2a5
d317
d389
d3fa
d46a
d4da
d54a
d5b9
d627
d695
d702
d76f
d7dc
d847
d8b3
d91e
d988
d9f2
da5b
dac3
db2c
db93
dbfa
dc61
dcc7
dd2c
dd91
ddf6
de5a
debd
df20
df82
dfe4
e045
e0a6
e106
e166
e1c5
e223
e281
e2df
e33b
e398
e3f4
e44f
e4a9
e504
e55d
e5b6
e60f
e667
e6be
e715
e76b
e7c1
e816
e86a
e8be
e912
e965
e9b7
ea09
ea5a
eaab
eafb
eb4a
eb99
ebe7
ec35
ec82
eccf
ed1b
ed67
edb2
edfc
ee46
ee8f
eed8
ef20
ef67
efae
eff5
f03a
f07f
f0c4
f108
f14c
f18e
f1d1
f212
f253
f294
f2d4
f313
f352
f390
f3ce
f40b
f447
f483
f4be
f4f9
f533
f56d
f5a6
f5de
f616
f64d
f683
f6b9
f6ee
f723
f757
f78b
f7be
f7f0
f822
f853
f884
f8b4
f8e3
f912
f940
f96d
f99a
f9c7
f9f2
fa1e
fa48
fa72
fa9b
fac4
faec
fb14
fb3b
fb61
fb87
fbac
fbd0
fbf4
fc17
fc3a
fc5c
fc7e
fc9f
fcbf
fcde
fcfd
fd1c
fd3a
fd57
fd73
fd8f
fdab
fdc6
fde0
fdf9
fe12
fe2a
fe42
fe59
fe70
fe86
fe9b
feaf
fec3
fed7
feea
fefc
ff0d
ff1e
ff2f
ff3e
ff4d
ff5c
ff6a
ff77
ff84
ff90
ff9b
ffa6
ffb0
ffba
ffc3
ffcb
ffd3
ffda
ffe0
ffe6
ffeb
fff0
fff4
fff7
fffa
fffc
fffe
ffff
