// DA demonstration (00H-1BH) and WIMP51 instruction-set test (1CH-38H)
C3 74 00 34 0A D4 34 F0
D4 C3 34 60 D4 C3 C4 34
0F D4 C3 34 FB D4 C3 34
44 D4 C3 D4 74 05 34 07
FF 3F C4 EF 6F 4F C4 3F
5F D3 C3 74 04 C3 34 FF
60 02 80 F9 D3 34 02 80
FE
