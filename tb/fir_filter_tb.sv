// fir_filter_tb: loads random 63-tap coefficient sets and compares every
// output with a direct evaluation of y(n) = sum h(k) x(n-k), shifted right by
// 14 and saturated to 16 bits, one clock after the input. Also checks a
// unit-impulse response and the delay of the symbol mark.
`timescale 1ns / 1ps
module fir_filter_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 63;
  logic signed [15:0] x = 0, y;
  logic fi = 0, fo;
  logic cwe = 0;
  logic [5:0] ca = 0;
  logic signed [15:0] cd = 0;
  logic signed [15:0] h [N];
  logic signed [15:0] xs [$];

  fir_filter u_dut (.clk, .rst_n, .x_in(x), .first_in(fi), .coef_we(cwe), .coef_addr(ca),
                    .coef_data(cd), .y_out(y), .first_out(fo));

  function automatic logic signed [15:0] ref_y();
    longint acc = 0;
    for (int k = 0; k < N; k++)
      if (k < xs.size()) acc += longint'(h[k]) * longint'(xs[xs.size() - 1 - k]);
    acc = acc >>> 14;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return 16'(acc);
  endfunction

  task automatic load(int kind);
    for (int k = 0; k < N; k++) begin
      case (kind)
        0: h[k] = (k == 0) ? 16'sh4000 : 16'sh0;
        1: h[k] = 16'($urandom_range(0, 2047)) - 16'sd1024;
        default: h[k] = 16'($urandom);
      endcase
      cwe <= 1; ca <= 6'(k); cd <= h[k];
      @(posedge clk);
    end
    cwe <= 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int kind = 0; kind < 3; kind++) begin
      load(kind);
      xs.delete();
      // flush the pipeline with zeros
      x <= 0; repeat (N + 2) @(posedge clk);
      for (int n = 0; n < 600; n++) begin
        logic signed [15:0] nx;
        logic nf;
        nx = (kind == 0 && n == 5) ? 16'sd12345 : (kind == 0 ? 16'sd0 : 16'($urandom));
        if (kind == 1) nx = nx >>> 2;
        nf = (n % 7) == 0;
        x <= nx; fi <= nf;
        xs.push_back(nx);
        @(posedge clk); #1;
        checks++;
        if (y !== ref_y() || fo !== nf) begin
          failures++;
          if (failures < 6) $display("FAIL set %0d n=%0d y=%0d expected %0d", kind, n, y, ref_y());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
