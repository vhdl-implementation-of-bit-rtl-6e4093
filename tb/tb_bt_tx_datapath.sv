// tb_bt_tx_datapath: self-checking testbench of bt_tx_datapath.
//
// Sends random packets (random UAP, clock bits, header and a payload of 0 to
// 100 bits) and compares every transmitted bit with the air bits from
// bt_ref_pkg::build_packet. Random tx_ready and pl_valid gaps stall the
// chain; an offered bit must not change while it waits. For packets sent
// without any stall the start-to-done time must be 7 + 10 + 8 + N + 16 + 1
// cycles (N payload bits; no payload and CRC when N = 0), i.e. one bit per
// clock after the 7-cycle whitening initialisation.
module tb_bt_tx_datapath;
  import bt_pkg::*;
  import bt_ref_pkg::*;

  localparam int LEN_W = 13;
  localparam int NPKT  = 150;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [7:0] uap = 0;
  logic [6:1] clk_bits = 0;
  logic [9:0] hdr = 0;
  logic [LEN_W-1:0] pl_len = 0;
  logic pl_bit = 0, pl_valid = 0, pl_ready;
  logic tx_bit, tx_valid, tx_ready = 0;
  logic busy, done;
  int checks = 0, failures = 0;

  bt_tx_datapath dut (.*);

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
    int n, pi, cyc, stall_pct, stalls;
    logic held_bit;
    bit held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NPKT; p++) begin
      n = (p % 5 == 0) ? 0 : int'($urandom_range(1, 100));
      stall_pct = (p % 3 == 0) ? 0 : 30;
      pl.delete();
      for (int i = 0; i < n; i++) pl.push_back(bit'($urandom_range(0, 1)));
      uap = 8'($urandom); clk_bits = 6'($urandom); hdr = 10'($urandom);
      pl_len = LEN_W'(n);
      build_packet(uap, clk_bits, hdr, pl, air);
      start = 1;
      @(negedge clk);
      start = 0;
      uap = 0; clk_bits = 0; hdr = 0; pl_len = 0;   // set-up is sampled on start only
      got.delete();
      pi = 0; cyc = 1; stalls = 0; held = 0;
      while (!done) begin
        tx_ready = ($urandom_range(0, 99) >= stall_pct);
        pl_valid = (pi < n) && ($urandom_range(0, 99) >= stall_pct);
        pl_bit   = (pi < n) ? pl[pi] : 1'b0;
        #1;
        if (held) begin
          check(tx_valid && tx_bit == held_bit, "stalled bit held");
          held = 0;
        end
        if (tx_valid && !tx_ready && (got.size() < 18 || got.size() >= 18 + n)) begin
          held = 1; held_bit = tx_bit;
        end
        if (pl_valid && pl_ready) pi++;
        if (tx_valid && tx_ready) got.push_back(tx_bit);
        if (busy && !(tx_valid && tx_ready) && (tx_valid || pl_ready)) stalls++;
        @(negedge clk);
        cyc++;
        if (cyc > 10000) break;
      end
      tx_ready = 0; pl_valid = 0;
      check(got.size() == air.size(), $sformatf("pkt %0d length %0d exp %0d", p, got.size(), air.size()));
      foreach (air[i]) if (i < got.size())
        check(got[i] == air[i], $sformatf("pkt %0d bit %0d", p, i));
      check(pi == n, "all payload bits taken");
      if (stalls == 0)
        check(cyc == 7 + 18 + (n ? n + 16 : 0) + 1,
              $sformatf("latency %0d for N=%0d", cyc, n));
      check(!busy, "idle after done");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
