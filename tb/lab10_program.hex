20080042
08000008
20090004
01095022
01485825
ac0b002c
8d2c0028
08000007
1000fff9
