// tb_bt_bitstream_datapath: end-to-end testbench of bt_bitstream_datapath at
// its default parameters.
//
// The transmit stream is looped back into the receiver through a channel
// model that may flip one bit per packet (standing in for FEC, RF and the
// air). Each packet is started on both halves in the same cycle with the same
// UAP and clock bits. Checked per packet: every transmitted bit against
// bt_ref_pkg::build_packet, the received header, payload and HEC/CRC
// verdicts. The run includes one packet with the largest payload the length
// counter allows (2^LEN_W - 1 bits). Each mechanism of the datapath is
// counted and must occur at least once: packets with and without payload,
// transmit stalls from tx_ready, payload gaps from pl_valid, receive pauses,
// HEC failures and CRC failures detected.
module tb_bt_bitstream_datapath;
  import bt_pkg::*;
  import bt_ref_pkg::*;

  localparam int LEN_W = 13;
  localparam int NPKT  = 60;

  logic clk = 0, rst_n = 0;
  logic tx_start = 0, rx_start = 0;
  logic [7:0] tx_uap = 0, rx_uap = 0;
  logic [6:1] tx_clk_bits = 0, rx_clk_bits = 0;
  logic [9:0] tx_hdr = 0;
  logic [LEN_W-1:0] tx_pl_len = 0, rx_pl_len = 0;
  logic tx_pl_bit = 0, tx_pl_valid = 0, tx_pl_ready;
  logic tx_bit, tx_valid, tx_ready = 0, tx_busy, tx_done;
  logic rx_bit, rx_valid;
  logic [9:0] rx_hdr;
  logic rx_hdr_valid, rx_hec_ok, rx_pl_bit, rx_pl_valid, rx_crc_ok, rx_busy, rx_done;
  int checks = 0, failures = 0;
  int flip_at = -1, ch_idx = 0;

  bt_bitstream_datapath dut (.*);

  // channel: one bit position per packet may be inverted
  assign rx_valid = tx_valid && tx_ready;
  assign rx_bit   = tx_bit ^ (ch_idx == flip_at);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
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

  int n_pl_pkts = 0, n_nopl_pkts = 0, n_tx_stall = 0, n_pl_gap = 0, n_rx_pause = 0;
  int n_hec_fail = 0, n_crc_fail = 0, n_whole = 0;

  initial begin
    bit pl[$], air[$], got_tx[$], got_pl[$];
    logic [9:0] h;
    logic [7:0] u;
    logic [6:1] cb;
    int n, pi, cyc, stall_pct, hv;
    bit tx_fin, rx_fin, took;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NPKT; p++) begin
      if (p == 3)            n = (1 << LEN_W) - 1;
      else if (p % 6 == 0)   n = 0;
      else                   n = int'($urandom_range(1, 200));
      stall_pct = (p % 2) ? 25 : 0;
      pl.delete();
      for (int i = 0; i < n; i++) pl.push_back(bit'($urandom_range(0, 1)));
      h = 10'($urandom); u = 8'($urandom); cb = 6'($urandom);
      build_packet(u, cb, h, pl, air);
      flip_at = (p % 4 == 1) ? int'($urandom_range(0, 17))
              : (p % 4 == 2 && n > 0) ? int'($urandom_range(18, air.size() - 1)) : -1;
      tx_uap = u; tx_clk_bits = cb; tx_hdr = h; tx_pl_len = LEN_W'(n);
      rx_uap = u; rx_clk_bits = cb; rx_pl_len = LEN_W'(n);
      tx_start = 1; rx_start = 1;
      @(negedge clk);
      tx_start = 0; rx_start = 0;
      got_tx.delete(); got_pl.delete();
      pi = 0; cyc = 0; hv = 0; ch_idx = 0; tx_fin = 0; rx_fin = 0;
      while (!(tx_fin && rx_fin)) begin
        tx_ready    = ($urandom_range(0, 99) >= stall_pct);
        tx_pl_valid = (pi < n) && ($urandom_range(0, 99) >= stall_pct);
        tx_pl_bit   = (pi < n) ? pl[pi] : 1'b0;
        #1;
        if (tx_valid && !tx_ready) n_tx_stall++;
        if (tx_pl_ready && !tx_pl_valid && pi < n) n_pl_gap++;
        if (rx_busy && cyc > 7 && !rx_valid) n_rx_pause++;
        if (tx_pl_valid && tx_pl_ready) pi++;
        took = rx_valid;
        if (rx_valid) got_tx.push_back(tx_bit);
        if (rx_pl_valid) got_pl.push_back(rx_pl_bit);
        if (rx_hdr_valid) begin
          hv++;
          check(rx_hec_ok == !(flip_at >= 0 && flip_at < 18), $sformatf("pkt %0d hec_ok", p));
          if (!rx_hec_ok) n_hec_fail++;
          if (!(flip_at >= 0 && flip_at < 10)) check(rx_hdr == h, $sformatf("pkt %0d header", p));
        end
        if (tx_done) tx_fin = 1;
        if (rx_done) begin
          rx_fin = 1;
          check(rx_crc_ok == !(flip_at >= 18), $sformatf("pkt %0d crc_ok", p));
          if (!rx_crc_ok) n_crc_fail++;
        end
        @(negedge clk);
        if (took) ch_idx++;
        cyc++;
        if (cyc > 100000) break;
      end
      tx_ready = 0; tx_pl_valid = 0;
      check(hv == 1, "one header per packet");
      check(got_tx.size() == air.size(), $sformatf("pkt %0d tx length", p));
      foreach (air[i]) if (i < got_tx.size()) check(got_tx[i] == air[i], $sformatf("pkt %0d tx bit %0d", p, i));
      check(got_pl.size() == n, $sformatf("pkt %0d rx payload length", p));
      foreach (got_pl[i]) if (i < n && flip_at != 18 + i)
        check(got_pl[i] == pl[i], $sformatf("pkt %0d rx payload bit %0d", p, i));
      if (n == 0) n_nopl_pkts++; else n_pl_pkts++;
      if (n == (1 << LEN_W) - 1 && flip_at < 0) n_whole++;
      @(negedge clk);
    end
    $display("packets with payload %0d, without %0d, longest-payload packets %0d", n_pl_pkts, n_nopl_pkts, n_whole);
    $display("tx stalls %0d, payload gaps %0d, rx pauses %0d, HEC failures %0d, CRC failures %0d",
             n_tx_stall, n_pl_gap, n_rx_pause, n_hec_fail, n_crc_fail);
    check(n_pl_pkts > 0,  "packet with payload happened");
    check(n_nopl_pkts > 0, "packet without payload happened");
    check(n_whole > 0,    "longest payload happened");
    check(n_tx_stall > 0, "tx stall happened");
    check(n_pl_gap > 0,   "payload gap happened");
    check(n_rx_pause > 0, "rx pause happened");
    check(n_hec_fail > 0, "HEC failure detected");
    check(n_crc_fail > 0, "CRC failure detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
