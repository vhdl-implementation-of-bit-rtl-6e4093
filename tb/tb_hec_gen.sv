// tb_hec_gen: self-checking testbench of hec_gen.
//
// For random UAPs and 10-bit headers it (1) generates the HEC: preload,
// write the header LSB first (checking the pass-through), read 8 bits and
// compare them with the polynomial remainder computed in bt_ref_pkg, one bit
// per clock; (2) checks the received header + HEC in a freshly preloaded
// register and expects a zero remainder; (3) flips one of the 18 bits and
// expects a non-zero remainder (the code detects every single-bit error).
// Random cycles with en = 0 must leave the register unchanged.
module tb_hec_gen;
  import bt_pkg::*;
  import bt_ref_pkg::*;

  localparam int NPKT = 200;

  logic clk = 0, rst_n = 0, en = 0, init = 0, din = 0, dout, zero;
  logic [7:0] uap = 0;
  rw_e rw = RW_WRITE;
  int checks = 0, failures = 0;

  hec_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // one enabled edge, with a random number of disabled edges before it
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
    logic [7:0] u, hec_ref, hec_got;
    logic [9:0] hdr;
    bit msg[$];
    bit rxbits[$];
    int flip;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset value
    check(zero == 1'b1, "reset clears register");
    for (int p = 0; p < NPKT; p++) begin
      u   = (p == 0) ? 8'h00 : 8'($urandom);
      hdr = 10'($urandom);
      msg.delete();
      for (int i = 0; i < 10; i++) msg.push_back(hdr[i]);
      hec_ref = 8'(divider(longint'(u), msg, 8, G_HEC));
      // generation
      preload(u);
      rw = RW_WRITE;
      for (int i = 0; i < 10; i++) begin
        din = hdr[i];
        #1 check(dout == hdr[i], "write pass-through");
        tick(1);
      end
      rw = RW_READ;
      din = 0;
      for (int i = 7; i >= 0; i--) begin
        #1 hec_got[i] = dout;
        tick(1);
      end
      check(hec_got == hec_ref, $sformatf("HEC uap=%02h hdr=%03h got %02h exp %02h",
                                          u, hdr, hec_got, hec_ref));
      // checking: header then HEC, position 7 first
      rxbits = msg;
      for (int i = 7; i >= 0; i--) rxbits.push_back(hec_ref[i]);
      flip = (p % 2) ? int'($urandom_range(0, 17)) : -1;
      if (flip >= 0) rxbits[flip] = !rxbits[flip];
      preload(u);
      rw = RW_WRITE;
      foreach (rxbits[i]) begin
        din = rxbits[i];
        tick(1);
      end
      check(zero == (flip < 0), $sformatf("check remainder flip=%0d zero=%0b", flip, zero));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
