// Self-checking testbench for ctx_fifo: random pushes and pops against a
// queue model, checking data order, occupancy, full/empty flags and the
// fall-through head.
module tb_ctx_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_pushes = 0;

  ctx_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom % 100) < (cyc < 1500 ? 70 : 30);
      out_ready = ($urandom % 100) < (cyc < 1500 ? 30 : 70);
      in_data   = W'($urandom);
      #1;
      chk(count == $size(model), $sformatf("count %0d model %0d", count, $size(model)));
      chk(in_ready == ($size(model) < D), "in_ready");
      chk(out_valid == ($size(model) > 0), "out_valid");
      if (out_valid && $size(model) > 0) chk(out_data == model[0], $sformatf("head %h exp %h", out_data, model[0]));
      if (!in_ready) n_full++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) begin model.push_back(in_data); n_pushes++; end
    end
    chk(n_full > 0, "queue never filled");
    chk(n_pushes > 500, "too few pushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
