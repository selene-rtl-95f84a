// Self-checking testbench for sync_ram: random writes and two-port reads,
// checking the one-cycle read latency, hold of the output while the read
// enable is low, and read-before-write on a same-cycle collision.
module tb_sync_ram;
  localparam int W = 16, D = 37, NRD = 2, A = $clog2(D);
  logic clk = 0;
  logic we;
  logic [A-1:0] waddr;
  logic [W-1:0] wdata;
  logic [NRD-1:0] re;
  logic [NRD-1:0][A-1:0] raddr;
  logic [NRD-1:0][W-1:0] rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] exp_q [NRD];
  int checks = 0, failures = 0;

  sync_ram #(.WIDTH(W), .DEPTH(D), .NRD(NRD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; re = 0; raddr = '0; waddr = '0; wdata = '0;
    // fill every word
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = A'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int p = 0; p < NRD; p++) begin
      re[p] = 1; raddr[p] = '0; exp_q[p] = model[0];
    end
    @(negedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // outputs now reflect the reads of the previous edge
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== exp_q[p]) begin
          failures++; $display("FAIL port %0d: %h exp %h", p, rdata[p], exp_q[p]);
        end
      end
      we = $urandom % 2; waddr = A'($urandom % D); wdata = W'($urandom);
      for (int p = 0; p < NRD; p++) begin
        re[p] = $urandom % 2; raddr[p] = A'($urandom % D);
        if (($urandom % 4) == 0) raddr[p] = waddr;
        if (re[p]) exp_q[p] = model[raddr[p]];
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
