// tb_fz_flit_fifo: random writes and reads on the flit queue against a
// queue model; checks data order, that the queue fills (in_ready low) and
// empties (out_valid low), that the count matches the model, and that a
// write and a read in the same cycle of a full queue are both taken.
module tb_fz_flit_fifo;
  localparam int W = 130, DEPTH = 5;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_full_both = 0;

  fz_flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [$];

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (int'(count) != model.size() || out_valid != (model.size() != 0) ||
          (in_ready != (model.size() < DEPTH || out_ready))) begin
        failures++;
        if (failures < 10) $display("FAIL count=%0d model=%0d", count, model.size());
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (model.size() == DEPTH && in_valid && out_ready) n_full_both++;
      if (out_valid && out_ready) begin
        automatic logic [W-1:0] e = model.pop_front();
        checks++;
        if (out_data !== e) begin failures++; if (failures < 10) $display("FAIL data"); end
      end
      if (in_valid && in_ready) model.push_back(in_data);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      // phases that favour filling, then draining
      in_valid  = ($urandom_range(9) < ((t / 500) % 2 ? 3 : 8));
      out_ready = ($urandom_range(9) < ((t / 500) % 2 ? 8 : 3));
      in_data   = {2'($urandom), $urandom, $urandom, $urandom, $urandom};
    end
    @(negedge clk);
    in_valid = 0;
    $display("full=%0d empty=%0d full-and-both=%0d", n_full, n_empty, n_full_both);
    checks++;
    if (n_full == 0 || n_empty == 0 || n_full_both == 0) begin failures++; $display("FAIL a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
