// test program image: a few bytes at the start and the 6502 vectors
@0000
A9 01 8D 00 04 4C 00 20
@1FFA
00 20 00 20 00 20
