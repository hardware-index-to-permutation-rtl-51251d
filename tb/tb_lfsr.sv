// tb_lfsr: self-checking test of the LFSR random number generator.
//
// For every width M = 3..20 an LFSR runs from its seed until it returns to
// it; the period must be exactly 2^M - 1 and the register must never be zero,
// so it visits every non-zero word once.  A 32-bit LFSR is checked for the
// shift structure (the upper bits are the old lower bits), for never reaching
// zero, for holding while en is low, and for a zero seed being replaced.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int LO = 3, HI = 20;

  longint period [LO:HI];
  bit     zero_seen [LO:HI];

  for (genvar m = LO; m <= HI; m++) begin : g_w
    logic [m-1:0] x, x0;
    longint n = 0;
    lfsr #(.M(m), .SEED(32'h5)) u_dut (.clk, .rst_n, .en, .x);
    initial begin
      period[m] = 0;
      zero_seen[m] = 1'b0;
    end
    always @(posedge clk) if (rst_n && en) begin
      if (n == 0) x0 <= x;
      if (x == '0) zero_seen[m] <= 1'b1;
      if (n > 0 && x == x0 && period[m] == 0) period[m] <= n;
      n <= n + 1;
    end
  end

  logic [31:0] x32, x32z, prev;
  logic        en32 = 1'b0;
  lfsr #(.M(32), .SEED(32'hDEAD_BEEF)) u32 (.clk, .rst_n, .en(en32), .x(x32));
  lfsr #(.M(32), .SEED(32'h0)) u32z (.clk, .rst_n, .en(1'b0), .x(x32z));

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (x32 != 32'hDEAD_BEEF || x32z != 32'h1) begin
      failures++;
      $display("FAIL seed load %h %h", x32, x32z);
    end
    // 32-bit: shift structure, hold on en low
    for (int k = 0; k < 5000; k++) begin
      prev = x32;
      en32 <= (k % 7 != 3);
      @(posedge clk);
      #1;
      checks++;
      if (en32 ? (x32[31:1] != prev[30:0] || x32 == '0) : (x32 != prev)) begin
        failures++;
        if (failures < 10) $display("FAIL 32-bit step %h -> %h en=%0d", prev, x32, en32);
      end
    end
    en32 <= 1'b0;
    // periods of the small widths
    en <= 1'b1;
    repeat ((1 << HI) + 4) @(posedge clk);
    en <= 1'b0;
    @(posedge clk);
    for (int m = LO; m <= HI; m++) begin
      checks++;
      if (period[m] != (longint'(1) << m) - 1 || zero_seen[m]) begin
        failures++;
        $display("FAIL M=%0d period %0d zero %0d", m, period[m], zero_seen[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
