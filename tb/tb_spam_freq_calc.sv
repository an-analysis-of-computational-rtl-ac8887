// tb_spam_freq_calc: self-checking test of the P/F register files and their
// sequential read-out.
//
// For 300 cycles the testbench drives random increments on all four lanes
// (often several lanes on the same counter) and keeps shadow counts. It then
// pulses rd_start and checks that, two cycles later, the block presents all
// (2T+1)^2 = 81 pairs in order, one per cycle, each with F[y][x] and P[y]
// equal to the shadow counts, rd_last on the final one and rd_ena for exactly
// 81 cycles. A second round after clear checks that counting restarts at 0.
module tb_spam_freq_calc;
  import spam_pkg::*;

  localparam int T = 4;
  localparam int NB = 2*T + 1;
  localparam int NF = NB*NB;
  localparam int IW = $clog2(NB);
  localparam int FW = $clog2(NF);
  localparam int CNT_W = 19;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, rd_start = 1'b0;
  logic          p_en   [LANES];
  logic [IW-1:0] p_addr [LANES];
  logic          f_en   [LANES];
  logic [FW-1:0] f_addr [LANES];
  logic rd_ena, rd_last;
  logic [FW-1:0] rd_idx;
  logic [CNT_W-1:0] rd_p, rd_f;
  int checks = 0, failures = 0, cycle = 0;
  int sp [NB];
  int sf [NF];

  spam_freq_calc #(.T(T), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic round(int n_cycles);
    int n_out;
    foreach (sp[i]) sp[i] = 0;
    foreach (sf[i]) sf[i] = 0;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int n = 0; n < n_cycles; n++) begin
      int hot = int'($urandom_range(0, NF - 1));
      for (int k = 0; k < LANES; k++) begin
        int a = ($urandom_range(0, 1) == 1) ? hot : int'($urandom_range(0, NF - 1));
        f_addr[k] = FW'(a);
        p_addr[k] = IW'(a / NB);
        p_en[k]   = ($urandom_range(0, 3) != 0);
        f_en[k]   = p_en[k] && ($urandom_range(0, 2) != 0);
        if (p_en[k]) sp[a / NB]++;
        if (f_en[k]) sf[a]++;
      end
      @(negedge clk);
    end
    foreach (p_en[k]) begin p_en[k] = 1'b0; f_en[k] = 1'b0; end
    @(negedge clk);
    rd_start = 1'b1;
    @(negedge clk);
    rd_start = 1'b0;
    check(!rd_ena, "no output one cycle after rd_start");
    @(negedge clk);
    n_out = 0;
    while (rd_ena) begin
      check(int'(rd_idx) == n_out, "pair order");
      check(int'(rd_f) == sf[n_out], $sformatf("F[%0d] = %0d expected %0d", n_out, rd_f, sf[n_out]));
      check(int'(rd_p) == sp[n_out / NB], $sformatf("P for pair %0d = %0d expected %0d", n_out, rd_p, sp[n_out / NB]));
      check(rd_last == (n_out == NF - 1), "rd_last");
      n_out++;
      @(negedge clk);
    end
    check(n_out == NF, $sformatf("%0d pairs read", n_out));
  endtask

  initial begin
    foreach (p_en[k]) begin p_en[k] = 1'b0; f_en[k] = 1'b0; p_addr[k] = '0; f_addr[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    round(300);
    round(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cycle < 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
