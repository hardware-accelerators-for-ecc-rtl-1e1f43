// tb_ecc_acc_rom.hex: code ROM contents for tb_ecc_acc_rom, one 32-bit
// instruction per line from address 0: r2 = r0 + r1 mod p on the
// adder/subtracter (8-word elements at words 0, 8 and 16), then HALT.
28000000 // SETADDR0 @R0, 0
30000008 // SETADDRN @R0, 8
28080008 // SETADDR0 @R1, 8
30080008 // SETADDRN @R1, 8
28100010 // SETADDR0 @R2, 16
30100008 // SETADDRN @R2, 8
08008000 // READ add, @R0, @R1
18000000 // LAUNCH add, 0
20000000 // WAIT add
10100000 // WRITE add, @R2
80000000 // HALT
