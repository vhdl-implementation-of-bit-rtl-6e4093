// tb_data_whitening: self-checking testbench of data_whitening.
//
// For random clock values CLK6..CLK1 it shifts the initial word 1, CLK6, ...,
// CLK1 in through dinz in write mode (dout must equal din meanwhile), then
// whitens random data and compares dout with din XOR the whitening sequence
// computed in bt_ref_pkg as the D^6 coefficient of S0 * D^j mod
// (D^7 + D^4 + 1). Pauses with en = 0 in read mode must keep dout whitened
// with the held bit and must not advance the sequence. Whitening the output a
// second time with the same initial word must return the data. Finally the
// sequence must repeat with period 127 and not earlier.
module tb_data_whitening;
  import bt_pkg::*;
  import bt_ref_pkg::*;

  localparam int NRUN = 100;
  localparam int NBIT = 300;

  logic clk = 0, rst_n = 0, en = 0, din = 0, dinz = 0, dout;
  rw_e rw = RW_WRITE;
  int checks = 0, failures = 0;

  data_whitening dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  task automatic init_lfsr(input logic [6:1] cb);
    logic [6:0] w = whiten_init(cb);
    rw = RW_WRITE;
    en = 1;
    for (int i = 6; i >= 0; i--) begin
      dinz = w[i];
      din  = 1'($urandom);
      #1 check(dout == din, "dout = din during initialisation");
      @(negedge clk);
    end
    rw = RW_READ;
  endtask

  initial begin
    logic [6:1] cb;
    bit data[$], wout[$];
    bit seq[$];
    bit exp_b;
    int per;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      cb = 6'($urandom);
      data.delete(); wout.delete();
      init_lfsr(cb);
      for (int j = 0; j < NBIT; j++) begin
        data.push_back(bit'($urandom_range(0, 1)));
        din = data[j];
        exp_b = data[j] ^ whiten_bit(whiten_init(cb), j);
        if ($urandom_range(0, 4) == 0) begin
          en = 0;
          #1 check(dout == exp_b, "paused output keeps whitening");
          @(negedge clk);
        end
        en = 1;
        #1 check(dout == exp_b, $sformatf("clk=%02h bit %0d", cb, j));
        wout.push_back(dout);
        @(negedge clk);
      end
      // de-whitening with the same initial word returns the data
      init_lfsr(cb);
      foreach (wout[j]) begin
        din = wout[j];
        #1 check(dout == data[j], "de-whitening");
        @(negedge clk);
      end
    end
    // period of the sequence
    init_lfsr(6'h00);
    din = 0;
    seq.delete();
    for (int j = 0; j < 254; j++) begin
      #1 seq.push_back(dout);
      @(negedge clk);
    end
    per = 0;
    for (int p = 1; p <= 127 && per == 0; p++) begin
      bit same;
      same = 1;
      for (int j = 0; j + p < 254; j++) if (seq[j] != seq[j+p]) same = 0;
      if (same) per = p;
    end
    check(per == 127, $sformatf("period %0d", per));
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
