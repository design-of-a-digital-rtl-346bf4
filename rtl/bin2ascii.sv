// Translation table from a received character code to its glyph in the
// character ROM (the "binary to ASCII" step of the update sequence).
//
// Codes 0x00-0x0F are taken as a binary nibble and shown as the hexadecimal
// digit '0'-'9', 'A'-'F'. Printable ASCII codes map to their glyph: space,
// digits, upper-case letters (lower case is shown in upper case) and the
// punctuation of a sales slip . , : $ - + * / = # % ( ) ? ! ' " < > _ & @ ;.
// Any other code maps to GLYPH_UNKNOWN, a solid box, and clears `known`.
// The glyph numbering matches the character ROM image: 0 space, 1-10 digits,
// 11-36 letters, 37-59 punctuation.
//
// Timing: `glyph` and `known` are registered; they follow `code` one clock
// after a clock with `en` high and hold otherwise. The code set and the
// nibble rule are this design's choices; the document names the table only.
module bin2ascii
  import vga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [7:0]         code,
  output logic [GLYPH_W-1:0] glyph,
  output logic               known
);

  localparam int unsigned G_DIGIT  = 1;
  localparam int unsigned G_LETTER = 11;
  localparam int unsigned G_PUNCT  = 37;

  logic [GLYPH_W-1:0] g_next;
  logic               k_next;

  always_comb begin
    k_next = 1'b1;
    g_next = GLYPH_UNKNOWN;
    if (code <= 8'h09)                        g_next = GLYPH_W'(G_DIGIT + 32'(code));
    else if (code <= 8'h0F)                   g_next = GLYPH_W'(G_LETTER + 32'(code) - 10);
    else if (code >= "0" && code <= "9")      g_next = GLYPH_W'(G_DIGIT + 32'(code) - 32'h30);
    else if (code >= "A" && code <= "Z")      g_next = GLYPH_W'(G_LETTER + 32'(code) - 32'h41);
    else if (code >= "a" && code <= "z")      g_next = GLYPH_W'(G_LETTER + 32'(code) - 32'h61);
    else begin
      unique case (code)
        " ":     g_next = GLYPH_BLANK;
        ".":     g_next = GLYPH_W'(G_PUNCT + 0);
        ",":     g_next = GLYPH_W'(G_PUNCT + 1);
        ":":     g_next = GLYPH_W'(G_PUNCT + 2);
        "$":     g_next = GLYPH_W'(G_PUNCT + 3);
        "-":     g_next = GLYPH_W'(G_PUNCT + 4);
        "+":     g_next = GLYPH_W'(G_PUNCT + 5);
        "*":     g_next = GLYPH_W'(G_PUNCT + 6);
        "/":     g_next = GLYPH_W'(G_PUNCT + 7);
        "=":     g_next = GLYPH_W'(G_PUNCT + 8);
        "#":     g_next = GLYPH_W'(G_PUNCT + 9);
        "%":     g_next = GLYPH_W'(G_PUNCT + 10);
        "(":     g_next = GLYPH_W'(G_PUNCT + 11);
        ")":     g_next = GLYPH_W'(G_PUNCT + 12);
        "?":     g_next = GLYPH_W'(G_PUNCT + 13);
        "!":     g_next = GLYPH_W'(G_PUNCT + 14);
        "'":     g_next = GLYPH_W'(G_PUNCT + 15);
        "\"":    g_next = GLYPH_W'(G_PUNCT + 16);
        "<":     g_next = GLYPH_W'(G_PUNCT + 17);
        ">":     g_next = GLYPH_W'(G_PUNCT + 18);
        "_":     g_next = GLYPH_W'(G_PUNCT + 19);
        "&":     g_next = GLYPH_W'(G_PUNCT + 20);
        "@":     g_next = GLYPH_W'(G_PUNCT + 21);
        ";":     g_next = GLYPH_W'(G_PUNCT + 22);
        default: k_next = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      glyph <= GLYPH_BLANK;
      known <= 1'b1;
    end else if (en) begin
      glyph <= g_next;
      known <= k_next;
    end
  end

endmodule
