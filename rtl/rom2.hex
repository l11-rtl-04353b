07
06
05
04
03
02
01
00
