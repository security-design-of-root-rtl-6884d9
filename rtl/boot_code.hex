00000297
7e363f0a
6a4822e1
c7f75ecc
35b00bbb
404f0dde
5aa71ba5
1f0c18c0
0ca8b51f
c9317ff2
ab8edea9
9de897f4
c49de2c3
45d82946
f0b0efed
63289068
892fb8a7
3fbcddda
63b51371
5868f61c
948e9acb
b72cb1ae
b27d4d35
c3bbfd10
ca5f2d2f
d8dbf8c2
2fa9e139
565d1944
2ede53d3
62ba4716
695d537d
eca4feb8
de4532b7
0c0670aa
6a406801
733da16c
686d2ddb
84a2897e
28c622c5
a5963560
b4b3e93f
dfa7e592
e8afc7c9
99972e94
d21f48e3
7d3b18e6
92d0db0d
4c964108
57c170c7
c79ff77a
47132091
a58a60bc
395cc4eb
578d954e
acba9c55
a07fc1b0
3447e94f
53c24662
c4e99259
974bd7e4
3891c1f3
1fd79eb6
4364869d
db815758
726572d7
ae56724a
b1963d21
15a4340c
d7ae5ffb
0a0ad51e
dfd3b9e5
1d9da200
5dfc2d5f
ea981b32
68e040e9
40701534
3ca6bf03
684cd886
4bb1562d
272b41a8
df3238e7
2336e11a
df72bdb1
d3201b5c
6bf2ff0b
717748ee
a5ca7b75
6354d650
02f1b56f
68d66402
bf5cd379
9738e684
190f4013
d797c656
069049bd
4298fff8
9368c2f7
808e43ea
1491a241
26d316ac
86fba21b
2e6ff0be
b497e105
e54a5ea0
c089817f
726a20d2
89684a09
ff1b4bd4
78bc4523
21f56826
e91a614d
160f9248
d88a1107
e7e99aba
331bead1
e2d225fc
31d9492b
7cd1cc8e
2474ea95
94633af0
1064918f
5a8051a2
ee4ba499
8ccc4524
86dece33
fee2bdf6
12a89cdd
af13f898
5c572317
1215e58a
4b7a9761
b272494c
fddcf43b
03b9dc5e
ffda9825
2ec46b40
5863e59f
f385f672
0b8fe329
5640d274
fee7db43
f91cc7c6
dcd3fc6d
906b32e8
40d0f927
1f20245a
2c56a7f1
6a48809c
1497a34b
a585202e
d381e9b5
8fd2ef90
faa87daf
5f280f42
84fe05b9
c2adf3c4
3c886c53
3ea08596
6b757ffd
021a4138
2c389337
6655572a
f2991c81
5829cbec
47da565b
4fd097fe
3e63df45
0033c7e0
659359bf
de539c12
149f0c49
da88a914
4bb18163
70aaf766
3ca6278d
61662388
590ef147
46427dfa
996af511
932b2b3c
21b60d6b
cb7943ce
81b978d5
85cbf430
23c579cf
a1359ce2
1abbf6d9
9785f264
f8941a73
73b91d36
b8bef31d
70d3d9d8
a6151357
f4b498ca
8a3531a1
4ba19e8c
f47bc87b
8c9c239e
10fbb665
33c07480
ec1fdddf
973b11b2
2dddc569
349acfb4
dfa13783
3f87f706
c258e2ad
a8286428
a64bf967
4eb8a79a
2ca0d231
1b2225dc
eabc878b
8296376e
21e397f5
7a7648d0
b1c385ef
3f10fa82
aacd77f9
7dfc4104
7d89d893
af1484d6
464cf63d
8468c278
b0f4a377
a89baa6a
7696d6c1
5481c12c
17494a9b
e8047f3e
3c6a1d85
77927120
b41171ff
76a45752
44940e89
211f4654
3f3efda3
509bc6a6
cbb42dcd
d7d9f4c8
f1901187
9deaa13a
7c403f51
53d5707c
853311ab
12c3fb0e
cac84715
45f9ed70
8eaaa20f
4b222822
947a8919
fcb8dfa4
91f1a6b3
359abc76
03e7895d
1a00fb18
77df4397
e1728c0a
00060be1
ce7233cc
47cadcbb
43f1aade
a97714a5
4dd1bdc0
4970161f
c8f76cf2
aa09e7a9
70be0cf4
f312d3c3
c2ce6646
5a8008ed
b7a2d568
47e339a7
0d406ada
02913c71
22ed0b1c
8aa1abcb
77ea8eae
b72f8635
947ee210
6882ce2f
cbd125c2
9b0b2a39
ae63ce44
005384d3
8033c416
8556ac7d
62c483b8
69dcf3b7
72a13daa
52cad101
a91af66c
a1887edb
364ba67e
64ea9bc5
0ca65a60
fc43ca3f
ce9c5292
138750c9
081f2394
87a4b9e3
e907d5e6
1484740d
62ab0608
fa4d71c7
ea22047a
1ddbc991
0210f5bc
189055eb
61f1f24e
45e15555
e62d26b0
b1540a4f
bb85f362
e5c75b59
41a50ce4
973772f3
3bc79bb6
02625f9d
e3db5c58
39f5b3d7
a38fbf4a
7f2d2621
6824090c
c40a30fb
08fa721e
9f8cb2e5
de384700
e0948e5f
bbfb0832
9a5449e9
dfea8a34
8d7cb003
4a301586
43896f2d
481a86a8
9dd6b9e7
f5f76e1a
1067e6b1
fee9305c
d087100b
34c225ee
f9a5b475
8f2cbb50
9f26566f
08a89102
fff71c79
79249b84
29257113
493e4356
56d2a2bd
766d84f8
df3183f7
2fa610ea
79750b41
23356bac
d2d7f31b
b9e60dbe
ae255a05
c0af83a0
ce6a627f
b97b8dd2
bbb8d309
04c840d4
9922b623
a12f2526
d556fa4d
2b195748
0b871207
6628a7ba
007d93d1
bb1dbafc
d80dda2b
0843298e
7944a395
b7a59ff0
2c01b28f
95a0fea2
d8e26d99
2b8a7a24
8ca57f33
bd7fbaf6
026f75dd
47a2fd98
94986417
464c328a
19ea8061
85f71e4c
7579c53b
faf6795e
097c9125
86341040
61cd469f
e385e372
58fcec29
97604774
431ecc43
dced04c6
5bb5156d
22cf77e8
60667a27
e41db15a
f864d0f1
6c56959c
d8acb44b
a85cfd2e
8f8622b5
5bbfd490
15ee1eaf
38d73c42
c3d14eb9
437ea8c4
9c3f9d53
e1740296
2900d8fd
d8a3c638
d9325437
8aea242a
1cd58581
d01120ec
d777a75b
3213b4fe
4e5a5845
d4edece0
fac53abf
4a820912
b7689549
cc5a9e14
27f8f263
2051b466
0c6bc08d
9a64e888
fd7cf247
8d3e8afa
e6659e11
dc3bc03c
ffeb9e6b
94f7a0ce
2b3231d5
4ba35930
def39acf
bcb349e2
780bbfd9
bfa92764
367bcb73
32031a36
924ecc1d
fe97ded8
70075457
14e7e5ca
227e1aa1
d52b738c
a859997b
7925c09e
3d86af65
27051980
bd5a3edf
f2d7feb2
8043ce69
ec5f44b4
e8392883
c2453406
c142fbad
5101a928
87d27a67
f2f3349a
9cc7fb31
68753adc
ff52988b
01fb146e
5f10d0f5
2b782dd0
cd1a26ef
df9d2782
10d9c0f9
b2b1f604
3de20993
601501d6
aa214f3d
e2a74778
601f6477
6fad776a
af2c3fc1
fcee162c
1ba79b9b
9e149c3e
bbc99685
caa19620
919452ff
d4efc452
c0d69789
54163b54
28676ea3
4daf83a6
f802c6cd
59cdb9c8
e86f1287
1aa3ae3a
d1d3e851
02ab057c
0c69a2ab
d74f580e
61ea0015
73665270
ea69c30f
53fcd522
0d835219
434114a4
98fa57b3
5091b976
8040625d
01fa0018
