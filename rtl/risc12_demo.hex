// Demonstration program: paints all VGA cells with the switch colour: one 16-bit instruction per line, then its address and assembly
cfff  // 000  LOADLIT R1, 0xFFF
6288  // 001  LOAD    R4, R1
d000  // 002  LOADLIT R2, 0x800
9cb0  // 003  LOADLIT R3, 1200
42d4  // 004  STORE   R2, R4
50d0  // 005  INCA    R2, R2
5998  // 006  DECA    R3, R3
0504  // 007  JF.ZERO fill
0000  // 008  NOP
2001  // 009  J       outer
0000  // 00a  NOP
