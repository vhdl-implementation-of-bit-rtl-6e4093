// tb_crc_gen: self-checking testbench of crc_gen.
//
// For random UAPs and random payloads of 0..64 bits it (1) generates the
// CRC: preload {0, UAP}, write the payload LSB first (checking the
// pass-through), read 16 bits, position 15 first, and compares them with the
// polynomial remainder from bt_ref_pkg; (2) checks payload + CRC in a freshly
// preloaded register and expects a zero remainder; (3) flips one bit, or two
// adjacent bits, and expects a non-zero remainder. Random en = 0 cycles must
// hold the register.
module tb_crc_gen;
  import bt_pkg::*;
  import bt_ref_pkg::*;

  localparam int NPKT = 200;

  logic clk = 0, rst_n = 0, en = 0, init = 0, din = 0, dout, zero;
  logic [7:0] uap = 0;
  rw_e rw = RW_WRITE;
  int checks = 0, failures = 0;

  crc_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic tick(input bit stall_ok);
    if (stall_ok && $urandom_range(0, 3) == 0) begin
      logic z = zero;
      en = 0;
      @(negedge clk);
      check(zero == z, "hold with en=0");
    end
    en = 1;
    @(negedge clk);
    en = 0;
  endtask

  task automatic preload(input logic [7:0] u);
    init = 1; uap = u;
    tick(0);
    init = 0;
  endtask

  initial begin
    logic [7:0]  u;
    logic [15:0] crc_ref, crc_got;
    bit msg[$];
    bit rxbits[$];
    int n, flip;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(zero == 1'b1, "reset clears register");
    // preload leaves {0, UAP}: with UAP = 0 the register is zero
    preload(8'h00);
    check(zero == 1'b1, "preload with UAP 0");
    preload(8'h80);
    check(zero == 1'b0, "preload with UAP 80");
    for (int p = 0; p < NPKT; p++) begin
      u = 8'($urandom);
      n = (p < 2) ? p : int'($urandom_range(1, 64));
      msg.delete();
      for (int i = 0; i < n; i++) msg.push_back(bit'($urandom_range(0, 1)));
      crc_ref = 16'(divider(longint'(u), msg, 16, G_CRC));
      preload(u);
      rw = RW_WRITE;
      foreach (msg[i]) begin
        din = msg[i];
        #1 check(dout == msg[i], "write pass-through");
        tick(1);
      end
      rw = RW_READ;
      din = 0;
      for (int i = 15; i >= 0; i--) begin
        #1 crc_got[i] = dout;
        tick(1);
      end
      check(crc_got == crc_ref, $sformatf("CRC uap=%02h n=%0d got %04h exp %04h",
                                          u, n, crc_got, crc_ref));
      rxbits = msg;
      for (int i = 15; i >= 0; i--) rxbits.push_back(crc_ref[i]);
      flip = (p % 2) ? int'($urandom_range(0, rxbits.size() - 2)) : -1;
      if (flip >= 0) begin
        rxbits[flip] = !rxbits[flip];
        if (p % 4 == 3) rxbits[flip+1] = !rxbits[flip+1];
      end
      preload(u);
      rw = RW_WRITE;
      foreach (rxbits[i]) begin
        din = rxbits[i];
        tick(1);
      end
      check(zero == (flip < 0), $sformatf("check remainder flip=%0d", flip));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
