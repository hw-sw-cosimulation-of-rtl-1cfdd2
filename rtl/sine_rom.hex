0000
00c0
017f
023f
02ff
03bf
047e
053e
05fd
06bd
077c
083c
08fb
09ba
0a79
0b38
0bf7
0cb6
0d74
0e33
0ef1
0fb0
106e
112c
11e9
12a7
1364
1422
14df
159b
1658
1714
17d1
188d
1948
1a04
1abf
1b7a
1c35
1cef
1da9
1e63
1f1d
1fd6
208f
2147
2200
22b8
236f
2427
24de
2594
264b
2700
27b6
286b
2920
29d4
2a88
2b3c
2bef
2ca1
2d54
2e05
2eb7
2f68
3018
30c8
3178
3227
32d5
3384
3431
34de
358b
3637
36e2
378d
3838
38e2
398b
3a34
3adc
3b84
3c2b
3cd2
3d78
3e1d
3ec2
3f66
4009
40ac
414f
41f0
4291
4332
43d2
4471
450f
45ad
464a
46e6
4782
481d
48b8
4951
49ea
4a82
4b1a
4bb1
4c47
4cdc
4d71
4e05
4e98
4f2a
4fbc
504c
50dc
516c
51fa
5288
5315
53a1
542c
54b7
5540
55c9
5651
56d8
575f
57e4
5869
58ed
596f
59f2
5a73
5af3
5b73
5bf1
5c6f
5cec
5d67
5de2
5e5d
5ed6
5f4e
5fc5
603c
60b1
6126
619a
620c
627e
62ef
635f
63ce
643b
64a8
6514
657f
65e9
6653
66bb
6722
6788
67ed
6851
68b4
6916
6977
69d7
6a36
6a94
6af1
6b4d
6ba8
6c02
6c5b
6cb3
6d09
6d5f
6db4
6e07
6e5a
6eab
6efb
6f4b
6f99
6fe6
7032
707d
70c7
7110
7158
719e
71e4
7228
726c
72ae
72ef
732f
736e
73ac
73e9
7424
745f
7498
74d0
7507
753d
7572
75a6
75d9
760a
763a
7669
7697
76c4
76f0
771b
7744
776c
7794
77ba
77de
7802
7825
7846
7866
7885
78a3
78c0
78db
78f6
790f
7927
793e
7954
7968
797c
798e
799f
79af
79bd
79cb
79d7
79e2
79ec
79f5
79fd
7a03
7a09
7a0d
7a10
7a11
7a12
7a11
7a10
7a0d
7a09
7a03
79fd
79f5
79ec
79e2
79d7
79cb
79bd
79af
799f
798e
797c
7968
7954
793e
7927
790f
78f6
78db
78c0
78a3
7885
7866
7846
7825
7802
77de
77ba
7794
776c
7744
771b
76f0
76c4
7697
7669
763a
760a
75d9
75a6
7572
753d
7507
74d0
7498
745f
7424
73e9
73ac
736e
732f
72ef
72ae
726c
7228
71e4
719e
7158
7110
70c7
707d
7032
6fe6
6f99
6f4b
6efb
6eab
6e5a
6e07
6db4
6d5f
6d09
6cb3
6c5b
6c02
6ba8
6b4d
6af1
6a94
6a36
69d7
6977
6916
68b4
6851
67ed
6788
6722
66bb
6653
65e9
657f
6514
64a8
643b
63ce
635f
62ef
627e
620c
619a
6126
60b1
603c
5fc5
5f4e
5ed6
5e5d
5de2
5d67
5cec
5c6f
5bf1
5b73
5af3
5a73
59f2
596f
58ed
5869
57e4
575f
56d8
5651
55c9
5540
54b7
542c
53a1
5315
5288
51fa
516c
50dc
504c
4fbc
4f2a
4e98
4e05
4d71
4cdc
4c47
4bb1
4b1a
4a82
49ea
4951
48b8
481d
4782
46e6
464a
45ad
450f
4471
43d2
4332
4291
41f0
414f
40ac
4009
3f66
3ec2
3e1d
3d78
3cd2
3c2b
3b84
3adc
3a34
398b
38e2
3838
378d
36e2
3637
358b
34de
3431
3384
32d5
3227
3178
30c8
3018
2f68
2eb7
2e05
2d54
2ca1
2bef
2b3c
2a88
29d4
2920
286b
27b6
2700
264b
2594
24de
2427
236f
22b8
2200
2147
208f
1fd6
1f1d
1e63
1da9
1cef
1c35
1b7a
1abf
1a04
1948
188d
17d1
1714
1658
159b
14df
1422
1364
12a7
11e9
112c
106e
0fb0
0ef1
0e33
0d74
0cb6
0bf7
0b38
0a79
09ba
08fb
083c
077c
06bd
05fd
053e
047e
03bf
02ff
023f
017f
00c0
0000
ff40
fe81
fdc1
fd01
fc41
fb82
fac2
fa03
f943
f884
f7c4
f705
f646
f587
f4c8
f409
f34a
f28c
f1cd
f10f
f050
ef92
eed4
ee17
ed59
ec9c
ebde
eb21
ea65
e9a8
e8ec
e82f
e773
e6b8
e5fc
e541
e486
e3cb
e311
e257
e19d
e0e3
e02a
df71
deb9
de00
dd48
dc91
dbd9
db22
da6c
d9b5
d900
d84a
d795
d6e0
d62c
d578
d4c4
d411
d35f
d2ac
d1fb
d149
d098
cfe8
cf38
ce88
cdd9
cd2b
cc7c
cbcf
cb22
ca75
c9c9
c91e
c873
c7c8
c71e
c675
c5cc
c524
c47c
c3d5
c32e
c288
c1e3
c13e
c09a
bff7
bf54
beb1
be10
bd6f
bcce
bc2e
bb8f
baf1
ba53
b9b6
b91a
b87e
b7e3
b748
b6af
b616
b57e
b4e6
b44f
b3b9
b324
b28f
b1fb
b168
b0d6
b044
afb4
af24
ae94
ae06
ad78
aceb
ac5f
abd4
ab49
aac0
aa37
a9af
a928
a8a1
a81c
a797
a713
a691
a60e
a58d
a50d
a48d
a40f
a391
a314
a299
a21e
a1a3
a12a
a0b2
a03b
9fc4
9f4f
9eda
9e66
9df4
9d82
9d11
9ca1
9c32
9bc5
9b58
9aec
9a81
9a17
99ad
9945
98de
9878
9813
97af
974c
96ea
9689
9629
95ca
956c
950f
94b3
9458
93fe
93a5
934d
92f7
92a1
924c
91f9
91a6
9155
9105
90b5
9067
901a
8fce
8f83
8f39
8ef0
8ea8
8e62
8e1c
8dd8
8d94
8d52
8d11
8cd1
8c92
8c54
8c17
8bdc
8ba1
8b68
8b30
8af9
8ac3
8a8e
8a5a
8a27
89f6
89c6
8997
8969
893c
8910
88e5
88bc
8894
886c
8846
8822
87fe
87db
87ba
879a
877b
875d
8740
8725
870a
86f1
86d9
86c2
86ac
8698
8684
8672
8661
8651
8643
8635
8629
861e
8614
860b
8603
85fd
85f7
85f3
85f0
85ef
85ee
85ef
85f0
85f3
85f7
85fd
8603
860b
8614
861e
8629
8635
8643
8651
8661
8672
8684
8698
86ac
86c2
86d9
86f1
870a
8725
8740
875d
877b
879a
87ba
87db
87fe
8822
8846
886c
8894
88bc
88e5
8910
893c
8969
8997
89c6
89f6
8a27
8a5a
8a8e
8ac3
8af9
8b30
8b68
8ba1
8bdc
8c17
8c54
8c92
8cd1
8d11
8d52
8d94
8dd8
8e1c
8e62
8ea8
8ef0
8f39
8f83
8fce
901a
9067
90b5
9105
9155
91a6
91f9
924c
92a1
92f7
934d
93a5
93fe
9458
94b3
950f
956c
95ca
9629
9689
96ea
974c
97af
9813
9878
98de
9945
99ad
9a17
9a81
9aec
9b58
9bc5
9c32
9ca1
9d11
9d82
9df4
9e66
9eda
9f4f
9fc4
a03b
a0b2
a12a
a1a3
a21e
a299
a314
a391
a40f
a48d
a50d
a58d
a60e
a691
a713
a797
a81c
a8a1
a928
a9af
aa37
aac0
ab49
abd4
ac5f
aceb
ad78
ae06
ae94
af24
afb4
b044
b0d6
b168
b1fb
b28f
b324
b3b9
b44f
b4e6
b57e
b616
b6af
b748
b7e3
b87e
b91a
b9b6
ba53
baf1
bb8f
bc2e
bcce
bd6f
be10
beb1
bf54
bff7
c09a
c13e
c1e3
c288
c32e
c3d5
c47c
c524
c5cc
c675
c71e
c7c8
c873
c91e
c9c9
ca75
cb22
cbcf
cc7c
cd2b
cdd9
ce88
cf38
cfe8
d098
d149
d1fb
d2ac
d35f
d411
d4c4
d578
d62c
d6e0
d795
d84a
d900
d9b5
da6c
db22
dbd9
dc91
dd48
de00
deb9
df71
e02a
e0e3
e19d
e257
e311
e3cb
e486
e541
e5fc
e6b8
e773
e82f
e8ec
e9a8
ea65
eb21
ebde
ec9c
ed59
ee17
eed4
ef92
f050
f10f
f1cd
f28c
f34a
f409
f4c8
f587
f646
f705
f7c4
f884
f943
fa03
fac2
fb82
fc41
fd01
fdc1
fe81
ff40
