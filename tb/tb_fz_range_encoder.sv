// tb_fz_range_encoder: exhaustive check of the FlitZip range encoder over
// every (smallest, largest) chunk pair, against the encoding table: 000 for
// equal chunks, k = bits of the range + 1 when k <= 6, else 111. Also checks
// the worked example (chunks 0x80..0x83 give 011) and the compress line.
module tb_fz_range_encoder;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  logic [7:0] c_small, c_large;
  enc_e       enc;
  logic       compress;
  int checks = 0, failures = 0;
  int hist [8] = '{default: 0};

  fz_range_encoder dut (.c_small(c_small), .c_large(c_large), .enc(enc), .compress(compress));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++)
      for (int l = s; l < 256; l++) begin
        int exp_enc, k;
        c_small = 8'(s); c_large = 8'(l);
        #1;
        if (l == s) exp_enc = 0;
        else begin
          k = bitlen(l - s) + 1;
          exp_enc = (k <= 6) ? k : 7;
        end
        checks++;
        if (int'(enc) != exp_enc || compress != (exp_enc >= 1 && exp_enc <= 6)) begin
          failures++;
          if (failures < 10) $display("FAIL small=%02x large=%02x enc=%0d exp=%0d", s, l, enc, exp_enc);
        end
        hist[exp_enc]++;
      end
    // worked example: 0x80..0x83 -> 011
    c_small = 8'h80; c_large = 8'h83; #1;
    checks++; if (enc != ENC_DI3) begin failures++; $display("FAIL example enc=%0d", enc); end
    // widest compressible range (31) and the first uncompressible one (32)
    c_small = 8'h10; c_large = 8'h2F; #1;
    checks++; if (enc != ENC_DI6) begin failures++; $display("FAIL range31 enc=%0d", enc); end
    c_small = 8'h10; c_large = 8'h30; #1;
    checks++; if (enc != ENC_RAW || compress) begin failures++; $display("FAIL range32 enc=%0d", enc); end
    $display("encodings seen: 000:%0d 010:%0d 011:%0d 100:%0d 101:%0d 110:%0d 111:%0d",
             hist[0], hist[2], hist[3], hist[4], hist[5], hist[6], hist[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
