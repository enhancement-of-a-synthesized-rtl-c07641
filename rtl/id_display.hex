3C020000
3C03FFFF
3C03FFFF
24632010
AC620004
24420010
AC620014
24420002
AC620000
2442002E
AC620018
AC62001C
24420038
AC620008
AC62000C
24420001
AC620010
08000010
