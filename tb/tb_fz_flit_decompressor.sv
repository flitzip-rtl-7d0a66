// tb_fz_flit_decompressor: compresses random flits of every kind with the
// reference model, feeds encoding, base and segment to the one-flit
// decompressor and checks that the original flit comes back exactly one
// cycle later. Encoding 001 (1-bit differences, which the compressor never
// produces) is driven directly, as is the first flit of the worked example.
module tb_fz_flit_decompressor;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2:0] in_enc = '0;
  logic [7:0] in_base = '0;
  logic [127:0] in_seg = '0, out_flit;
  logic out_valid;
  int checks = 0, failures = 0;
  int hist [8] = '{default: 0};

  fz_flit_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [2:0] e, input logic [7:0] b, input logic [127:0] s,
                     input logic [127:0] expect_flit);
    @(negedge clk);
    in_valid = 1; in_enc = e; in_base = b; in_seg = s;
    @(negedge clk);
    in_valid = 0;
    in_seg = {$urandom, $urandom, $urandom, $urandom};   // must not matter any more
    checks++;
    if (!out_valid || out_flit !== expect_flit) begin
      failures++;
      if (failures < 10) $display("FAIL enc=%0d base=%h got=%h exp=%h v=%0b", e, b, out_flit, expect_flit, out_valid);
    end
    hist[e]++;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid without input"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // worked example, flit 1 as a 16-byte flit: base 81, 3-bit differences
    begin
      automatic logic [127:0] f = 128'h80818283_80818283_80818283_80818283, s;
      int e, b, l;
      ref_flit(f, 16, e, b, s, l);
      run(3'(e), 8'(b), s, f);
      checks++;
      if (e != 3 || b != 8'h81 || s[11:0] != 12'b110_111_000_001) begin
        failures++; $display("FAIL example segment %b", s[11:0]);
      end
    end
    // encoding 001: difference 0 or -1, so chunks are base or base+1
    for (int t = 0; t < 50; t++) begin
      automatic logic [127:0] s = '0, f;
      automatic logic [7:0] b = 8'($urandom_range(254));
      for (int j = 0; j < 16; j++) begin
        s[j] = 1'($urandom_range(1));
        f[(15-j)*8 +: 8] = s[j] ? b + 8'd1 : b;
      end
      run(3'd1, b, s, f);
    end
    for (int t = 0; t < 3000; t++) begin
      automatic logic [127:0] f = gen_flit($urandom_range(6)), s;
      int e, b, l;
      ref_flit(f, 16, e, b, s, l);
      run(3'(e), 8'(b), s, f);
    end
    for (int e = 0; e < 8; e++) begin
      checks++;
      if (hist[e] == 0) begin failures++; $display("FAIL encoding %0d never tried", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
