// tb_spam_divider: self-checking test of the pipelined probability divider.
//
// A new division enters every cycle: random num <= den over the full 19-bit
// range, small values, num == den (probability 1.0) and den == 0. Each result
// must appear exactly DIV_LAT = 18 cycles after its operands and equal
// floor(num * 2^16 / den), or 0 for den == 0.
module tb_spam_divider;
  import spam_pkg::*;

  localparam int NUM_W = 19;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_W-1:0] num = '0, den = '0;
  prob_t quo;
  int checks = 0, failures = 0, cycle = 0;
  longint expq [$];

  spam_divider #(.NUM_W(NUM_W), .FRAC_W(FRAC_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000 + DIV_LAT; n++) begin
      @(negedge clk);
      if (n >= DIV_LAT) begin
        longint e;
        e = expq.pop_front();
        checks++;
        if (longint'(quo) != e) begin
          failures++;
          if (failures < 20) $display("FAIL result %0d: %0d expected %0d", n - DIV_LAT, quo, e);
        end
      end
      if (n < 2000) begin
        int unsigned a, b;
        case ($urandom_range(0, 4))
          0: begin b = $urandom_range(1, (1 << NUM_W) - 1); a = $urandom_range(0, b); end
          1: begin b = $urandom_range(1, 20); a = $urandom_range(0, b); end
          2: begin b = $urandom_range(1, (1 << NUM_W) - 1); a = b; end
          3: begin b = 0; a = 0; end
          default: begin b = $urandom_range(1, 5000); a = $urandom_range(0, b); end
        endcase
        num = NUM_W'(a);
        den = NUM_W'(b);
        expq.push_back((b == 0) ? 0 : (longint'(a) << FRAC_W) / b);
      end
    end
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
