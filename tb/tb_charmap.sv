// tb_charmap: checks several glyphs pixel by pixel against a 5 x 7 column-coded reference
// (bit 0 = top row, glyph placed at columns 1..5, rows 1..7 of the 8 x 10 cell), and that
// pixels outside the cell read 0.
module tb_charmap;
  logic [5:0] char_code;
  logic [7:0] xy;
  logic pixel;
  int checks = 0, failures = 0;

  charmap dut (.char_code, .xy, .pixel);

  typedef struct { byte unsigned ascii; byte unsigned c [5]; } glyph_t;
  glyph_t ref_glyphs [8];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_glyphs[0] = '{8'h20, '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00}};
    ref_glyphs[1] = '{8'h30, '{8'h3E, 8'h51, 8'h49, 8'h45, 8'h3E}};
    ref_glyphs[2] = '{8'h37, '{8'h01, 8'h71, 8'h09, 8'h05, 8'h03}};
    ref_glyphs[3] = '{8'h2E, '{8'h00, 8'h60, 8'h60, 8'h00, 8'h00}};
    ref_glyphs[4] = '{8'h41, '{8'h7E, 8'h11, 8'h11, 8'h11, 8'h7E}};
    ref_glyphs[5] = '{8'h56, '{8'h1F, 8'h20, 8'h40, 8'h20, 8'h1F}};
    ref_glyphs[6] = '{8'h5A, '{8'h61, 8'h51, 8'h49, 8'h45, 8'h43}};
    ref_glyphs[7] = '{8'h2F, '{8'h20, 8'h10, 8'h08, 8'h04, 8'h02}};
    for (int g = 0; g < 8; g++) begin
      for (int r = 0; r < 16; r++) begin
        for (int c = 0; c < 16; c++) begin
          logic exp;
          exp = 1'b0;
          if (r >= 1 && r <= 7 && c >= 1 && c <= 5) exp = ref_glyphs[g].c[c - 1][r - 1];
          char_code = 6'(ref_glyphs[g].ascii - 8'h20);
          xy = {4'(r), 4'(c)};
          #1;
          checks++;
          if (pixel !== exp) begin
            failures++;
            $display("FAIL glyph %c row %0d col %0d: %b exp %b", ref_glyphs[g].ascii, r, c, pixel, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
