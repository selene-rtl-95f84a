// Self-checking testbench for pipe_fu: a 2-cycle adder and a 3-cycle Q16.16
// multiplier, driven with random operands, random operator enables and random
// stalls. Each result is compared with a value computed here and must leave
// exactly LAT advancing cycles after its operation entered. A second pair of
// units in single precision (FLOAT = 1, adder latency 7) is checked the same
// way against products and sums formed in double precision and rounded to
// single precision here; a sum of operands whose exponents differ by more
// than 26 may be off by one unit in the last place (double rounding of the
// reference), and is accepted within that. The sign of a zero result is not
// checked, because the reference loses the sign of zero operands.
module tb_pipe_fu;
  import tb_fp_ref::*;
  localparam int DW = 32, FR = 16, TW = 8;
  logic clk = 0, rst_n = 0, adv;
  int checks = 0, failures = 0;
  longint adv_cnt = 0;

  typedef struct { logic [DW-1:0] y; logic [TW-1:0] tag; longint t; } exp_t;

  // adder
  logic a_iv, a_en, a_ov, a_busy; logic [DW-1:0] a_a, a_b, a_y; logic [TW-1:0] a_it, a_ot;
  // multiplier
  logic m_iv, m_en, m_ov, m_busy; logic [DW-1:0] m_a, m_b, m_y; logic [TW-1:0] m_it, m_ot;
  exp_t qa[$], qm[$], qfa[$], qfm[$];
  // single-precision adder and multiplier
  logic fa_iv, fa_ov, fa_busy, fm_iv, fm_ov, fm_busy;
  logic [DW-1:0] fa_a, fa_b, fa_y, fm_a, fm_b, fm_y;
  logic [TW-1:0] fa_it, fa_ot, fm_it, fm_ot;
  int n_near = 0;

  pipe_fu #(.LAT(7), .IS_MUL(1'b0), .FLOAT(1'b1), .DATA_W(DW), .FRAC(FR), .TAG_W(TW)) u_fadd (
    .clk, .rst_n, .adv, .in_valid(fa_iv), .en_op(1'b1), .a(fa_a), .b(fa_b), .in_tag(fa_it),
    .out_valid(fa_ov), .y(fa_y), .out_tag(fa_ot), .busy(fa_busy));
  pipe_fu #(.LAT(3), .IS_MUL(1'b1), .FLOAT(1'b1), .DATA_W(DW), .FRAC(FR), .TAG_W(TW)) u_fmul (
    .clk, .rst_n, .adv, .in_valid(fm_iv), .en_op(1'b1), .a(fm_a), .b(fm_b), .in_tag(fm_it),
    .out_valid(fm_ov), .y(fm_y), .out_tag(fm_ot), .busy(fm_busy));

  function automatic logic [31:0] rnd_f32();
    logic [31:0] f;
    f = $urandom;
    f[30:23] = 8'(60 + $urandom % 136);   // normal numbers of moderate range
    if ($urandom % 8 == 0) f[30:0] = '0;  // some zeros
    return f;
  endfunction

  task automatic check_f(input logic ov, input logic [DW-1:0] y, input logic [TW-1:0] tg,
                         ref exp_t q[$], input int lat, input string nm);
    if (ov && adv) begin
      if ($size(q) == 0) chk(0, {nm, " unexpected result"});
      else begin
        exp_t e = q.pop_front();
        if (y[30:0] == 0 && e.y[30:0] == 0) chk(1, "");     // sign of zero not modelled
        else if (y != e.y && e.tag[0] && ((y - e.y == 1) || (e.y - y == 1))) n_near++;
        else chk(y == e.y, $sformatf("%s y=%h exp %h", nm, y, e.y));
        chk(adv_cnt - e.t == lat, $sformatf("%s latency %0d", nm, adv_cnt - e.t));
      end
    end
  endtask

  pipe_fu #(.LAT(2), .IS_MUL(1'b0), .DATA_W(DW), .FRAC(FR), .TAG_W(TW)) u_add (
    .clk, .rst_n, .adv, .in_valid(a_iv), .en_op(a_en), .a(a_a), .b(a_b), .in_tag(a_it),
    .out_valid(a_ov), .y(a_y), .out_tag(a_ot), .busy(a_busy));
  pipe_fu #(.LAT(3), .IS_MUL(1'b1), .DATA_W(DW), .FRAC(FR), .TAG_W(TW)) u_mul (
    .clk, .rst_n, .adv, .in_valid(m_iv), .en_op(m_en), .a(m_a), .b(m_b), .in_tag(m_it),
    .out_valid(m_ov), .y(m_y), .out_tag(m_ot), .busy(m_busy));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic check_out(input logic ov, input logic [DW-1:0] y, input logic [TW-1:0] tg,
                           ref exp_t q[$], input int lat, input string nm);
    if (ov && adv) begin
      if ($size(q) == 0) chk(0, {nm, " unexpected result"});
      else begin
        exp_t e = q.pop_front();
        chk(y == e.y && tg == e.tag, $sformatf("%s y=%h exp %h tag %h exp %h", nm, y, e.y, tg, e.tag));
        chk(adv_cnt - e.t == lat, $sformatf("%s latency %0d", nm, adv_cnt - e.t));
      end
    end
  endtask

  initial begin
    fa_iv = 0; fm_iv = 0; fa_a = 0; fa_b = 0; fm_a = 0; fm_b = 0; fa_it = 0; fm_it = 0;
    adv = 1; a_iv = 0; m_iv = 0; a_en = 0; m_en = 0;
    a_a = 0; a_b = 0; m_a = 0; m_b = 0; a_it = 0; m_it = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      adv  = ($urandom % 100) < 80;
      a_iv = $urandom % 2; a_en = ($urandom % 4) != 0;
      a_a = $urandom; a_b = $urandom; a_it = TW'($urandom);
      m_iv = $urandom % 2; m_en = ($urandom % 4) != 0;
      m_a = $urandom % (1 << 24); m_b = $urandom % (1 << 20); m_it = TW'($urandom);
      fa_iv = $urandom % 2; fa_a = rnd_f32(); fa_b = rnd_f32();
      if ($urandom % 4 == 0) fa_b[30:23] = fa_a[30:23] - 8'($urandom % 3);  // cancellation
      fa_it = TW'($urandom);
      fm_iv = $urandom % 2; fm_a = rnd_f32(); fm_b = rnd_f32(); fm_it = TW'($urandom);
      #1;
      check_out(a_ov, a_y, a_ot, qa, 2, "add");
      check_out(m_ov, m_y, m_ot, qm, 3, "mul");
      check_f(fa_ov, fa_y, fa_ot, qfa, 7, "fadd");
      check_f(fm_ov, fm_y, fm_ot, qfm, 3, "fmul");
      if (adv && fa_iv) begin
        exp_t e; int de;
        de = int'(fa_a[30:23]) - int'(fa_b[30:23]);
        e.y = to_f32(from_f32(fa_a) + from_f32(fa_b));
        e.tag = {7'd0, (de > 26 || de < -26)};   // tag of the model: near-match allowed
        e.t = adv_cnt; qfa.push_back(e);
      end
      if (adv && fm_iv) begin
        exp_t e;
        e.y = to_f32(from_f32(fm_a) * from_f32(fm_b)); e.tag = '0; e.t = adv_cnt; qfm.push_back(e);
      end
      if (adv && a_iv) begin
        exp_t e; e.y = a_en ? a_a + a_b : a_a; e.tag = a_it; e.t = adv_cnt; qa.push_back(e);
      end
      if (adv && m_iv) begin
        exp_t e; longint unsigned p;
        p = longint'(m_a) * longint'(m_b);
        e.y = m_en ? DW'(p >> FR) : m_a; e.tag = m_it; e.t = adv_cnt; qm.push_back(e);
      end
      if (adv) adv_cnt++;
    end
    chk(checks > 6000, "too few results");
    $display("single-precision sums accepted within one ulp: %0d", n_near);
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
