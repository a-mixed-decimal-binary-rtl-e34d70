// tb_align_shifter - random check of the two alignment shifters.
// Random 20-digit significands and every left and right shift amount 0..22.  Reference: X
// placed in the 21-digit frame (extension digit zero) and multiplied by 16^lsa as a plain
// integer, keeping the frame width; Y placed likewise and divided by 16^rsa.
// Combinational block.
module tb_align_shifter;
  import mfa_pkg::*;

  sig_t cx, cy;
  logic [4:0] lsa, rsa;
  frame_t ax, ay;
  int checks = 0, failures = 0;

  align_shifter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [2*FRAME*4-1:0] wx, wy;
      frame_t ex_x, ex_y;
      cx = {$urandom, $urandom, 16'($urandom)};
      cy = {$urandom, $urandom, 16'($urandom)};
      lsa = 5'($urandom % 23);
      rsa = 5'($urandom % 23);
      #1;
      wx = {{(FRAME*4){1'b0}}, cx, 4'b0000};
      for (int i = 0; i < int'(lsa); i++) wx = wx * 16;
      wy = {{(FRAME*4){1'b0}}, cy, 4'b0000};
      for (int i = 0; i < int'(rsa); i++) wy = wy / 16;
      ex_x = wx[FRAME*4-1:0];
      ex_y = wy[FRAME*4-1:0];
      checks++;
      if (ax != ex_x || ay != ex_y) begin
        failures++;
        if (failures < 5) $display("FAIL lsa=%0d rsa=%0d ax=%h/%h ay=%h/%h", lsa, rsa, ax, ex_x, ay, ex_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
