02
00
40
05
40
32
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
90
00
00
74
35
24
27
F0
A3
74
F0
24
20
34
05
F0
A3
94
20
F0
A3
E5
D0
F0
A3
75
F0
0D
74
0B
A4
F0
A3
75
F0
05
84
F0
A3
E5
F0
F0
A3
78
30
76
AA
E6
F0
A3
79
31
85
30
31
E5
31
04
F0
A3
C4
F0
A3
C0
E0
74
00
D0
F0
E5
F0
F0
A3
D2
00
D2
07
E5
20
F0
A3
B2
07
E5
20
F0
A3
7A
03
74
00
24
02
DA
FC
F0
A3
12
01
00
F0
A3
B4
77
02
74
11
F0
A3
B4
12
02
74
99
33
F0
A3
74
19
24
28
D4
F0
A3
74
02
83
80
01
5E
F0
A3
74
5A
44
0F
54
3C
64
FF
F0
A3
79
F0
E3
F0
A3
C5
F0
F0
A3
E5
F0
F0
A3
75
C1
3C
E5
C2
F0
A3
E5
40
F0
A3
74
FF
F0
A3
80
FE
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
74
77
22
00
00
00
00
00
00
00
00
00
00
00
00
00
