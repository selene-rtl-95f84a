// Self-checking testbench for outer_epilogue (Stage 3). Random {i, acc}
// results arrive with random gaps; each must be stored at score[i] as
// (acc * DAMPING) >> 16 exactly MUL_LAT = 3 cycles after it was accepted, the
// stage must always be ready, and n_done must count the stores.
module tb_outer_epilogue;
  import selene_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic ir_valid, ir_ready, sc_we, busy;
  inner_res_t ir_data;
  node_t sc_addr; data_t sc_data;
  logic [NODE_W:0] n_done;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  typedef struct { node_t i; data_t y; int t; } exp_t;
  exp_t q[$];
  int cyc = 0;

  outer_epilogue dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sc_we) begin
      exp_t e;
      if ($size(q) == 0) chk(0, "unexpected store");
      else begin
        e = q.pop_front();
        chk(sc_addr == e.i && sc_data == e.y, $sformatf("store %0d %h exp %0d %h", sc_addr, sc_data, e.i, e.y));
        chk(cyc - e.t == 3, $sformatf("latency %0d", cyc - e.t));
      end
      n_out++;
    end
    if (ir_valid) begin
      exp_t e; longint unsigned p;
      chk(ir_ready, "not ready");
      p = longint'(ir_data.acc) * 64'd55706;
      e.i = ir_data.i; e.y = data_t'(p >> 16); e.t = cyc;
      q.push_back(e);
      n_in++;
    end
    cyc++;
  end

  initial begin
    ir_valid = 0; ir_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ir_valid = $urandom % 2;
      ir_data.i = node_t'($urandom);
      ir_data.acc = (k % 7 == 0) ? $urandom : $urandom % (1 << 22);
    end
    @(negedge clk); ir_valid = 0;
    repeat (6) @(negedge clk);
    chk(n_out == n_in && n_in > 500, "stores missing");
    chk(32'(n_done) == n_out, $sformatf("n_done %0d exp %0d", n_done, n_out));
    chk(!busy, "busy when drained");
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
