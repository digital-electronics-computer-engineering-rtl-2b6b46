20080007
20100005
2011fffd
02119020
02119824
0230a02a
0211a82a
12110002
ac120040
8c160040
02d0b822
12f10001
20080bad
02744825
0800000e
