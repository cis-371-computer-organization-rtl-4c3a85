// Sample LC4 program: sum 1..10, draw 8 pixels, 6*7 in a subroutine,
// show the results on the LED and seven-segment registers, then spin.
@8200
9000 920A 1001 127F 03FD 4821 9400 D5FE
708E 7690 0FFF
@8210
9800 D9C1 9A00 DB7C 9C08 7B00 1921 1DBF
03FC 9606 9207 16C9 633F C1C0
