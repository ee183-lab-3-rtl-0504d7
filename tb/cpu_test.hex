// Directed processor test program: one 16-bit instruction per line, then its address and assembly
8805  // 000  LOADLIT R1, 5
9007  // 001  LOADLIT R2, 7
580a  // 002  ADD     R3, R1, R2
6159  // 003  SUB     R4, R3, R1
685c  // 004  ADDINC  R5, R3, R4
f2bc  // 005  LOADLIT R6, 0xABC
bfff  // 006  LOADLIT R7, 0x7FF
40b0  // 007  PASSA2  R0, R6
40c0  // 008  INCA    R0, R0
4107  // 009  SUBDEC  R0, R0, R7
4180  // 00a  DECA    R0, R0
49c0  // 00b  PASSA7  R1, R0
4a30  // 00c  LSL     R1, R6
5270  // 00d  ASR     R2, R6
5a78  // 00e  ASR     R3, R7
6400  // 00f  ZEROES  R4
6477  // 010  AND     R4, R6, R7
6cb7  // 011  ANDNOTA R5, R6, R7
44c5  // 012  PASSB   R0, R5
4d37  // 013  ANDNOTB R1, R6, R7
5548  // 014  PASSA   R2, R1
5db7  // 015  XOR     R3, R6, R7
65f3  // 016  OR      R4, R6, R3
6e33  // 017  NOR     R5, R6, R3
4677  // 018  XNOR    R0, R6, R7
4eb0  // 019  PASSNOTA R1, R6
56f7  // 01a  ORNOTA  R2, R6, R7
5f07  // 01b  PASSNOTB R3, R7
6777  // 01c  ORNOTB  R4, R6, R7
6fb7  // 01d  NAND    R5, R6, R7
47c0  // 01e  ONES    R0
b900  // 01f  LOADLIT R7, 0x100
42fe  // 020  STORE   R7, R6
78f8  // 021  INCA    R7, R7
42f8  // 022  STORE   R7, R0
8900  // 023  LOADLIT R1, 0x100
5288  // 024  LOAD    R2, R1
5812  // 025  ADD     R3, R2, R2
62b8  // 026  LOAD    R4, R7
0000  // 027  NOP
6da2  // 028  XOR     R5, R4, R2
42cd  // 029  STORE   R1, R5
7288  // 02a  LOAD    R6, R1
cfff  // 02b  LOADLIT R1, 0xFFF
5288  // 02c  LOAD    R2, R1
d800  // 02d  LOADLIT R3, 0x800
42da  // 02e  STORE   R3, R2
dcaf  // 02f  LOADLIT R3, 0xCAF
42da  // 030  STORE   R3, R2
8801  // 031  LOADLIT R1, 1
9002  // 032  LOADLIT R2, 2
414a  // 033  SUB     R0, R1, R2
1437  // 034  JT.NEG  c1
0000  // 035  NOP
7fc0  // 036  ONES    R7
414a  // 037  SUB     R0, R1, R2
0467  // 038  JF.NEG  bad
0000  // 039  NOP
4149  // 03a  SUB     R0, R1, R1
153e  // 03b  JT.ZERO c2
0000  // 03c  NOP
7fc0  // 03d  ONES    R7
4149  // 03e  SUB     R0, R1, R1
1642  // 03f  JT.CARRY c3
0000  // 040  NOP
7fc0  // 041  ONES    R7
4151  // 042  SUB     R0, R2, R1
1767  // 043  JT.NEGZERO bad
0000  // 044  NOP
4151  // 045  SUB     R0, R2, R1
0667  // 046  JF.CARRY bad
0000  // 047  NOP
414a  // 048  SUB     R0, R1, R2
174c  // 049  JT.NEGZERO c4
0000  // 04a  NOP
7fc0  // 04b  ONES    R7
400a  // 04c  ADD     R0, R1, R2
1567  // 04d  JT.ZERO bad
70f0  // 04e  INCA    R6, R6
400a  // 04f  ADD     R0, R1, R2
0067  // 050  JF.TRUE bad
0000  // 051  NOP
400a  // 052  ADD     R0, R1, R2
1056  // 053  JT.TRUE c5
0000  // 054  NOP
7fc0  // 055  ONES    R7
a800  // 056  LOADLIT R5, 0
a00a  // 057  LOADLIT R4, 10
682c  // 058  ADD     R5, R5, R4
61a0  // 059  DECA    R4, R4
0558  // 05a  JF.ZERO lp
0000  // 05b  NOP
8902  // 05c  LOADLIT R1, 0x102
42cd  // 05d  STORE   R1, R5
185e  // 05e  JT.EXT  wa
0000  // 05f  NOP
0860  // 060  JF.EXT  w1
0000  // 061  NOP
1862  // 062  JT.EXT  w0
0000  // 063  NOP
95a5  // 064  LOADLIT R2, 0x5A5
206a  // 065  J       done
50d0  // 066  INCA    R2, R2
fbad  // 067  LOADLIT R7, 0xBAD
8903  // 068  LOADLIT R1, 0x103
42cf  // 069  STORE   R1, R7
8904  // 06a  LOADLIT R1, 0x104
42ca  // 06b  STORE   R1, R2
206c  // 06c  J       halt
0000  // 06d  NOP
