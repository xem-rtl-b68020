// tb_dfpu: self-checking test of the double-precision FPU. A random stream
// of FP64 and paired-FP32 operations (add, sub, mul, MAC) is issued one per
// cycle with random gaps; every result must come out exactly STAGES-1
// cycles after issue, in order, equal to a reference built from simulator
// reals (exact small-integer operands for MAC, IEEE double for the rest).
//
// The four-stage latency and the operation set come from the architecture;
// the FP32 lane pairing checked is this design's own.
module tb_dfpu;
  import xem_pkg::*;
  import tb_fp_pkg::*;

  localparam int STAGES = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, fp32, out_valid;
  xop_e        op;
  rm_e         rm;
  logic [63:0] a, b, c, res;
  fflags_t     flags;
  int checks = 0, failures = 0, cycle = 0;

  dfpu #(.STAGES(STAGES)) dut (.*);

  logic [63:0] qe [$];
  int          qd [$];
  logic [63:0] ex;
  int          du;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // compare at each negedge: the oldest pending result must be due now
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (qe.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        ex = qe.pop_front();
        du = qd.pop_front();
        if (du != cycle || res !== ex) begin
          failures++;
          $display("FAIL result %h exp %h at cycle %0d due %0d", res, ex, cycle, du);
        end
      end
    end else if (qe.size() != 0 && qd[0] <= cycle) begin
      failures++; checks++;
      $display("FAIL result missing at cycle %0d", cycle);
      void'(qe.pop_front()); void'(qd.pop_front());
    end
  end

  function automatic real rint(input int lo, input int hi);
    return real'($urandom_range(0, hi - lo)) + real'(lo);
  endfunction

  initial begin
    real x0, x1, y0, y1, z0, z1;
    logic [63:0] e;
    in_valid = 0; fp32 = 0; op = OP_ADD; rm = RM_RNE; a = 0; b = 0; c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op   = xop_e'($urandom_range(0, 3));
      fp32 = 1'($urandom);
      if (!fp32) begin
        x0 = d2r({1'b0, 11'(1000 + $urandom_range(0, 40)), 20'($urandom), 32'($urandom)});
        y0 = d2r({1'($urandom), 11'(1000 + $urandom_range(0, 40)), 20'($urandom), 32'($urandom)});
        if (op == OP_MAC) begin x0 = rint(-99, 99); y0 = rint(-99, 99); end
        z0 = rint(-999, 999);
        a = r2d(x0); b = r2d(y0); c = r2d(z0);
        case (op)
          OP_ADD: e = r2d(x0 + y0);
          OP_SUB: e = r2d(x0 - y0);
          OP_MUL: e = r2d(x0 * y0);
          default: e = r2d(x0 * y0 + z0);
        endcase
      end else begin
        x0 = rint(-500, 500); x1 = rint(-500, 500); y0 = rint(-500, 500); y1 = rint(-500, 500);
        z0 = rint(-999, 999); z1 = rint(-999, 999);
        a = {r2f(x1), r2f(x0)}; b = {r2f(y1), r2f(y0)}; c = {r2f(z1), r2f(z0)};
        case (op)
          OP_ADD: e = {r2f(x1 + y1), r2f(x0 + y0)};
          OP_SUB: e = {r2f(x1 - y1), r2f(x0 - y0)};
          OP_MUL: e = {r2f(x1 * y1), r2f(x0 * y0)};
          default: e = {r2f(x1 * y1 + z1), r2f(x0 * y0 + z0)};
        endcase
      end
      if (in_valid) begin qe.push_back(e); qd.push_back(cycle + STAGES - 1); end
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 2) @(negedge clk);
    checks++;
    if (qe.size() != 0) begin failures++; $display("FAIL %0d results never came", qe.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
