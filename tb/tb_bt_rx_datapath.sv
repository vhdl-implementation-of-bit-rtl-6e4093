// tb_bt_rx_datapath: self-checking testbench of bt_rx_datapath.
//
// Builds the air bits of random packets with bt_ref_pkg::build_packet and
// feeds them with random rx_valid gaps. Checks the recovered header, the
// de-whitened payload bits and the HEC and CRC verdicts. One packet in three
// gets one bit flipped: in the header or HEC part it must give hec_ok = 0, in
// the payload or CRC part crc_ok = 0 with hec_ok = 1. Without gaps done must
// come 7 + 18 + N + 16 + 1 cycles after start
module tb_bt_rx_datapath;
  import bt_pkg::*;
  import bt_ref_pkg::*;

  localparam int LEN_W = 13;
  localparam int NPKT  = 150;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [7:0] uap = 0;
  logic [6:1] clk_bits = 0;
  logic [LEN_W-1:0] pl_len = 0;
  logic rx_bit = 0, rx_valid = 0;
  logic [9:0] hdr;
  logic hdr_valid, hec_ok, pl_bit, pl_valid, crc_ok, busy, done;
  int checks = 0, failures = 0;

  bt_rx_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit pl[$], air[$], got[$];
    logic [9:0] h;
    int n, ai, cyc, gap_pct, flip, hv;
    bit saw_hdr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NPKT; p++) begin
      n = (p % 5 == 0) ? 0 : int'($urandom_range(1, 100));
      gap_pct = (p % 2 == 0) ? 0 : 30;
      pl.delete();
      for (int i = 0; i < n; i++) pl.push_back(bit'($urandom_range(0, 1)));
      h = 10'($urandom);
      uap = 8'($urandom); clk_bits = 6'($urandom); pl_len = LEN_W'(n);
      build_packet(uap, clk_bits, h, pl, air);
      flip = (p % 3 == 1) ? int'($urandom_range(0, air.size() - 1)) : -1;
      if (flip >= 0) air[flip] = !air[flip];
      start = 1;
      @(negedge clk);
      start = 0;
      uap = 0; clk_bits = 0; pl_len = 0;
      got.delete();
      ai = 0; cyc = 1; saw_hdr = 0; hv = 0;
      forever begin
        rx_valid = (cyc > 7) && (ai < air.size()) && ($urandom_range(0, 99) >= gap_pct);
        rx_bit   = (ai < air.size()) ? air[ai] : 1'b0;
        #1;
        if (rx_valid) ai++;
        if (pl_valid) got.push_back(pl_bit);
        if (hdr_valid) begin
          hv++;
          saw_hdr = 1;
          check(hec_ok == !(flip >= 0 && flip < 18), $sformatf("pkt %0d hec_ok flip=%0d", p, flip));
          if (flip < 0 || flip >= 10) check(hdr == h, $sformatf("pkt %0d header", p));
        end
        if (done) break;
        @(negedge clk);
        cyc++;
        if (cyc > 10000) break;
      end
      rx_valid = 0;
      check(hv == 1, "one hdr_valid pulse");
      check(saw_hdr && ai == air.size(), "whole packet consumed");
      check(got.size() == n, $sformatf("pkt %0d payload length %0d", p, got.size()));
      foreach (got[i]) if (i < n && flip != 18 + i)
        check(got[i] == pl[i], $sformatf("pkt %0d payload bit %0d", p, i));
      check(crc_ok == !(flip >= 18), $sformatf("pkt %0d crc_ok flip=%0d n=%0d", p, flip, n));
      if (gap_pct == 0)
        check(cyc == 7 + 18 + (n ? n + 16 : 0) + 1, $sformatf("latency %0d N=%0d", cyc, n));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
