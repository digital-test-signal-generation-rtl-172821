// symbol_accumulators_tb: feeds random symbol values S_i (some negative,
// some zero, some large enough to saturate before squaring) in gaps of 0 to 3
// clocks and checks each K-symbol result (sum, sum of squares after the
// shift, count of negative values) against a model, for K = 5 and K = 1.
`timescale 1ns / 1ps
module symbol_accumulators_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, results = 0;
  logic en = 0, sv = 0, rv;
  logic [23:0] k = 5;
  logic [5:0] sh = 4;
  logic signed [51:0] si = 0;
  logic signed [79:0] sum;
  logic [95:0] sumsq;
  logic [31:0] nerr;

  symbol_accumulators u_dut (.clk, .rst_n, .en, .k, .sq_shift(sh), .si_valid(sv), .si,
                             .res_valid(rv), .sum, .sumsq, .nerr);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [79:0] msum;
    logic [95:0] msq;
    int merr, cnt;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      k <= pass ? 24'd1 : 24'd5;
      en <= 1;
      msum = 0; msq = 0; merr = 0; cnt = 0;
      for (int n = 0; n < 600; n++) begin
        logic signed [51:0] v;
        logic signed [63:0] q;
        case (n % 10)
          0: v = 0;
          1: v = 52'sh7_FFFF_FFFF_FFFF;             // saturates after the shift
          2: v = -52'sh4_0000_0000_0000;
          default: v = 52'($signed(32'($urandom)));
        endcase
        si <= v; sv <= 1;
        @(posedge clk);
        sv <= 0;
        q = 64'(v >>> 4);
        if (q > 64'sh7FFF_FFFF) q = 64'sh7FFF_FFFF;
        if (q < -64'sh8000_0000) q = -64'sh8000_0000;
        msum += 80'(v); msq += 96'(q * q); merr += (v < 0); cnt++;
        #1;
        if (cnt == int'(k)) begin
          checks++; results++;
          if (!rv || sum !== msum || sumsq !== msq || nerr !== 32'(merr)) begin
            failures++;
            if (failures < 6) $display("FAIL n=%0d rv=%0b sum=%0d/%0d sq=%0d/%0d err=%0d/%0d",
                                       n, rv, sum, msum, sumsq, msq, nerr, merr);
          end
          msum = 0; msq = 0; merr = 0; cnt = 0;
        end else begin
          checks++; if (rv) failures++;
        end
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      en <= 0;
      @(posedge clk);
    end
    checks++; if (results != 120 + 600) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
