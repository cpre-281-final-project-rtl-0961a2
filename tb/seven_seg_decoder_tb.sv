// seven_seg_decoder_tb: all eight input combinations. The expected pattern
// is built from the list of segments that form each digit on a standard
// display ("1" = b,c; "2" = a,b,d,e,g; "3" = a,b,c,d,g; "4" = b,c,f,g),
// inverted because segments are active low.
module seven_seg_decoder_tb;
  import door_lock_pkg::*;
  logic en;
  logic [1:0] w;
  seg_t seg;
  int checks = 0, failures = 0;
  seven_seg_decoder dut (.en, .w, .seg);

  function automatic seg_t lit(string letters);
    seg_t m = '1;
    foreach (letters[i]) m[letters[i] - "a"] = 1'b0;
    return m;
  endfunction

  string glyph [4] = '{"bc", "abdeg", "abcdg", "bcfg"};

  initial begin
    for (int v = 0; v < 8; v++) begin
      seg_t exp;
      {en, w} = 3'(v);
      #1;
      exp = en ? lit(glyph[w]) : 7'b1111111;
      checks++;
      if (seg !== exp) begin failures++; $display("FAIL en=%b w=%0d seg=%b exp=%b", en, w, seg, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
