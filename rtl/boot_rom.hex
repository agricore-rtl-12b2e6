75
98
50
75
CB
FF
75
CA
FD
75
CD
FF
75
CC
FD
75
C8
34
75
99
55
90
00
00
12
00
40
FF
12
00
40
FE
EE
4F
60
0E
12
00
40
F0
A3
EE
70
01
1F
1E
80
F0
00
00
75
EA
01
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
30
98
FD
C2
98
E5
99
22
