0000
E803
1F00
1F00
2F10
EF20
E03F
2323
F009
E585
EE4E
2B23
F029
2733
EF5F
E061
1F56
1F77
1F76
CFFE
