// Glyph image of the character generator: 64 glyphs of 8 x 8 pixels.
//
// Entry g holds glyph g, row 0 in the top byte [63:56] and row 7 in [7:0];
// bit 7 of each row byte is the leftmost pixel. The glyphs are 5 x 7 dot
// matrices with an empty rightmost column and bottom row, so characters
// side by side and above each other stay apart. Their order is the glyph
// numbering of the translation table in bin2ascii: space, digits, letters,
// punctuation, three unused blanks and a solid box for unknown codes. The
// glyph shapes are this design's own.
package font_pkg;

  localparam logic [63:0] FONT [64] = '{
    64'h0000000000000000, //  0 space
    64'h38444C5464443800, //  1 0
    64'h1030101010103800, //  2 1
    64'h3844040810207C00, //  3 2
    64'h7C08100804443800, //  4 3
    64'h081828487C080800, //  5 4
    64'h7C40780404443800, //  6 5
    64'h1820407844443800, //  7 6
    64'h7C04081020202000, //  8 7
    64'h3844443844443800, //  9 8
    64'h3844443C04083000, // 10 9
    64'h3844447C44444400, // 11 A
    64'h7844447844447800, // 12 B
    64'h3844404040443800, // 13 C
    64'h7048444444487000, // 14 D
    64'h7C40407840407C00, // 15 E
    64'h7C40407840404000, // 16 F
    64'h3844405C44443C00, // 17 G
    64'h4444447C44444400, // 18 H
    64'h3810101010103800, // 19 I
    64'h1C08080808483000, // 20 J
    64'h4448506050484400, // 21 K
    64'h4040404040407C00, // 22 L
    64'h446C545444444400, // 23 M
    64'h444464544C444400, // 24 N
    64'h3844444444443800, // 25 O
    64'h7844447840404000, // 26 P
    64'h3844444454483400, // 27 Q
    64'h7844447850484400, // 28 R
    64'h3C40403804047800, // 29 S
    64'h7C10101010101000, // 30 T
    64'h4444444444443800, // 31 U
    64'h4444444444281000, // 32 V
    64'h4444445454542800, // 33 W
    64'h4444281028444400, // 34 X
    64'h4444281010101000, // 35 Y
    64'h7C04081020407C00, // 36 Z
    64'h0000000000303000, // 37 .
    64'h0000000030102000, // 38 ,
    64'h0030300030300000, // 39 :
    64'h103C503814781000, // 40 $
    64'h0000007C00000000, // 41 -
    64'h0010107C10100000, // 42 +
    64'h0010543854100000, // 43 *
    64'h0004081020400000, // 44 /
    64'h00007C007C000000, // 45 =
    64'h28287C287C282800, // 46 #
    64'h60640810204C0C00, // 47 %
    64'h0810202020100800, // 48 (
    64'h2010080808102000, // 49 )
    64'h3844040810001000, // 50 ?
    64'h1010101010001000, // 51 !
    64'h1010200000000000, // 52 quote
    64'h2828000000000000, // 53 double quote
    64'h0810204020100800, // 54 <
    64'h2010080408102000, // 55 >
    64'h0000000000007C00, // 56 _
    64'h3048502054483400, // 57 &
    64'h3844043454543800, // 58 @
    64'h0030300030102000, // 59 ;
    64'h0000000000000000, // 60 (unused)
    64'h0000000000000000, // 61 (unused)
    64'h0000000000000000, // 62 (unused)
    64'hFEFEFEFEFEFEFE00  // 63 (unknown code: box)
  };

endpackage
