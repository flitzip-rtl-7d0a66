// tb_fz_flit_compressor: drives random flits of every kind (all chunks equal,
// each compressible range, random bytes) and the flits of the worked example
// through the one-flit compressor with random stalls, and compares encoding,
// base, segment, length and the kept flit with the reference model. Checks
// that a flit's result is valid exactly one cycle after it is taken.
module tb_fz_flit_compressor;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  logic clk = 0, rst_n = 0, advance = 0, in_valid = 0;
  logic [127:0] in_flit = '0;
  logic out_valid;
  enc_e out_enc;
  logic [7:0] out_base, out_len;
  logic [127:0] out_seg, out_flit;
  int checks = 0, failures = 0;
  int hist [8] = '{default: 0};

  fz_flit_compressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] expq [$];
  logic [127:0] directed [4] = '{128'h80818283_80818283_80818283_80818283,
                                 128'hA47642BB_A47642BB_A47642BB_A47642BB,
                                 128'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF,
                                 128'h0};
  int directed_enc [4] = '{3, 7, 0, 0};
  int directed_base [4] = '{8'h81, -1, 8'hFF, 8'h00};

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && advance) begin
      if (out_valid) begin
        int e, b, l;
        logic [127:0] s, f;
        f = expq.pop_front();
        ref_flit(f, 16, e, b, s, l);
        checks++;
        if (int'(out_enc) != e || (e != 7 && int'(out_base) != b) || out_seg !== s ||
            int'(out_len) != l || out_flit !== f) begin
          failures++;
          if (failures < 10) $display("FAIL flit=%h enc=%0d/%0d base=%0d/%0d len=%0d/%0d",
                                      f, out_enc, e, out_base, b, out_len, l);
        end
        hist[e]++;
      end
      if (in_valid) expq.push_back(in_flit);
    end
  end

  // one-cycle latency with no stalls
  logic prev_take = 0;
  always @(posedge clk) begin
    if (rst_n && advance) begin
      if (prev_take) begin
        checks++;
        if (!out_valid) begin failures++; $display("FAIL latency"); end
      end
    end
    prev_take <= rst_n && advance && in_valid;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // worked example, no stalls
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      advance = 1; in_valid = 1; in_flit = directed[i];
      @(posedge clk); #1;
      checks++;
      if (int'(out_enc) != directed_enc[i] || (directed_base[i] >= 0 && int'(out_base) != directed_base[i])) begin
        failures++; $display("FAIL example flit %0d enc=%0d base=%h", i+1, out_enc, out_base);
      end
    end
    // random, with stalls
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      advance  = ($urandom_range(3) != 0);
      in_valid = ($urandom_range(4) != 0);
      in_flit  = gen_flit($urandom_range(6));
    end
    @(negedge clk); in_valid = 0; advance = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    for (int e = 0; e < 8; e++) if (e != 1) begin
      checks++;
      if (hist[e] == 0) begin failures++; $display("FAIL encoding %0d never produced", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
