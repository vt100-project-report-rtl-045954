// glyph 'A' (0x41), 16 rows, at address {row, 7'h41}
@041 00
@0c1 00
@141 10
@1c1 38
@241 6c
@2c1 c6
@341 c6
@3c1 fe
@441 c6
@4c1 c6
@541 c6
@5c1 c6
@641 00
@6c1 00
@741 00
@7c1 00
