// tb_fz_bit_strip: random differences and every encoding; checks that the
// low k bits of difference j land at bits [(j-1)*k +: k], that the rest is
// zero, that the length is k*16, and that with the strip disabled the flit
// passes unchanged with length 128 (or 0 for encoding 000).
module tb_fz_bit_strip;
  import flitzip_pkg::*;

  logic [127:0] di, stripped;
  logic [2:0]   enc;
  logic         enable;
  logic [7:0]   len;
  int checks = 0, failures = 0;

  fz_bit_strip dut (.di(di), .enc(enc), .enable(enable), .stripped(stripped), .len(len));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [127:0] exp;
      int exp_len;
      di     = {$urandom, $urandom, $urandom, $urandom};
      enc    = 3'($urandom_range(7));
      enable = (enc != 0 && enc != 7) ? 1'b1 : 1'b0;
      if (t % 7 == 0 && enc != 0) enable = 1'b0;   // strip disabled
      if (!enable && enc != 0) enc = 3'd7;
      #1;
      exp = '0;
      if (enable) begin
        for (int j = 0; j < 16; j++)
          for (int b = 0; b < int'(enc); b++)
            exp[j*int'(enc) + b] = di[(15-j)*8 + b];
        exp_len = int'(enc) * 16;
      end else begin
        exp = (enc == 0) ? '0 : di;
        exp_len = (enc == 0) ? 0 : 128;
      end
      checks++;
      if (stripped !== exp || int'(len) != exp_len) begin
        failures++;
        if (failures < 10) $display("FAIL enc=%0d en=%0b len=%0d exp_len=%0d", enc, enable, len, exp_len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
