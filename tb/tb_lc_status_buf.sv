// Self-checking testbench for lc_status_buf: random stores, clears and reads
// over II = 3 slots against a model, including the same-cycle write-to-read
// bypass that forwarding relies on.
module tb_lc_status_buf;
  import selene_pkg::*;
  localparam int II = 3;
  logic clk = 0, rst_n = 0;
  logic wr_en, clr_en, rd_valid;
  slot_t wr_slot, rd_slot;
  data_t wr_data, rd_data;
  bit    m_vld [II];
  data_t m_val [II];
  int checks = 0, failures = 0, n_bypass = 0;

  lc_status_buf #(.II(II)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    wr_en = 0; clr_en = 0; wr_slot = 0; rd_slot = 0; wr_data = 0;
    for (int k = 0; k < II; k++) m_vld[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit ev; data_t ed;
      @(negedge clk);
      wr_en   = $urandom % 2;
      clr_en  = !wr_en && ($urandom % 3 == 0);
      wr_slot = slot_t'($urandom % II);
      rd_slot = (($urandom % 2) == 0) ? wr_slot : slot_t'($urandom % II);
      wr_data = $urandom;
      #1;
      if ((wr_en || clr_en) && wr_slot == rd_slot) begin
        ev = wr_en; ed = wr_data; n_bypass++;
      end else begin
        ev = m_vld[rd_slot]; ed = m_val[rd_slot];
      end
      checks++;
      if (rd_valid != ev || (ev && rd_data != ed)) begin
        failures++;
        $display("FAIL cyc %0d slot %0d: valid %0d data %h exp %0d %h", cyc, rd_slot, rd_valid, rd_data, ev, ed);
      end
      @(posedge clk);
      if (wr_en) begin m_vld[wr_slot] = 1; m_val[wr_slot] = wr_data; end
      else if (clr_en) m_vld[wr_slot] = 0;
    end
    checks++;
    if (n_bypass == 0) failures++;
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
