// Hazard examples: data hazard, and a conditional jump not taken and taken: one 16-bit instruction per line, then its address and assembly
9123  // 000  LOADLIT R2, 0x123
9845  // 001  LOADLIT R3, 0x045
a811  // 002  LOADLIT R5, 0x011
b8f0  // 003  LOADLIT R7, 0x0F0
0000  // 004  NOP
0000  // 005  NOP
4813  // 006  ADD     R1, R2, R3
614d  // 007  SUB     R4, R1, R5
760f  // 008  NOR     R6, R1, R7
800f  // 009  LOADLIT R0, 0x00F
4813  // 00a  ADD     R1, R2, R3
150e  // 00b  JT.ZERO t1
616a  // 00c  SUB     R4, R5, R2
7c41  // 00d  AND     R7, R0, R1
7601  // 00e  NOR     R6, R0, R1
9900  // 00f  LOADLIT R3, 0x100
42dc  // 010  STORE   R3, R4
58d8  // 011  INCA    R3, R3
42df  // 012  STORE   R3, R7
58d8  // 013  INCA    R3, R3
42de  // 014  STORE   R3, R6
b8f0  // 015  LOADLIT R7, 0x0F0
dedd  // 016  LOADLIT R3, 0xEDD
4813  // 017  ADD     R1, R2, R3
151b  // 018  JT.ZERO t2
6155  // 019  SUB     R4, R2, R5
7c41  // 01a  AND     R7, R0, R1
7601  // 01b  NOR     R6, R0, R1
9903  // 01c  LOADLIT R3, 0x103
42dc  // 01d  STORE   R3, R4
58d8  // 01e  INCA    R3, R3
42df  // 01f  STORE   R3, R7
58d8  // 020  INCA    R3, R3
42de  // 021  STORE   R3, R6
2022  // 022  J       halt
0000  // 023  NOP
