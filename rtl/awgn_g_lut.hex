5b
5a
5a
5a
5a
5a
59
59
59
58
58
57
56
56
55
54
53
52
51
50
4f
4e
4d
4c
4b
49
48
47
45
44
42
41
3f
3e
3c
3a
39
37
35
33
31
2f
2e
2c
2a
28
26
24
22
20
1d
1b
19
17
15
13
11
0e
0c
0a
08
06
03
01
ff
fd
fa
f8
f6
f4
f2
ef
ed
eb
e9
e7
e5
e3
e0
de
dc
da
d8
d6
d4
d2
d1
cf
cd
cb
c9
c7
c6
c4
c2
c1
bf
be
bc
bb
b9
b8
b7
b5
b4
b3
b2
b1
b0
af
ae
ad
ac
ab
aa
aa
a9
a8
a8
a7
a7
a7
a6
a6
a6
a6
a6
a5
a5
a6
a6
a6
a6
a6
a7
a7
a7
a8
a8
a9
aa
aa
ab
ac
ad
ae
af
b0
b1
b2
b3
b4
b5
b7
b8
b9
bb
bc
be
bf
c1
c2
c4
c6
c7
c9
cb
cd
cf
d1
d2
d4
d6
d8
da
dc
de
e0
e3
e5
e7
e9
eb
ed
ef
f2
f4
f6
f8
fa
fd
ff
01
03
06
08
0a
0c
0e
11
13
15
17
19
1b
1d
20
22
24
26
28
2a
2c
2e
2f
31
33
35
37
39
3a
3c
3e
3f
41
42
44
45
47
48
49
4b
4c
4d
4e
4f
50
51
52
53
54
55
56
56
57
58
58
59
59
59
5a
5a
5a
5a
5a
5b
