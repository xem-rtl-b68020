// tb_sfpu: self-checking test of the single-precision FPU. Random FP32
// pairs are issued with random gaps; lane 0 must return a0 op hi(b) and
// lane 1 a1 op lo(b) (the swapped halves of B) exactly STAGES-1 cycles
// after issue. Operands are integers, so the references are exact.
//
// The swap of the B halves and the latency come from the architecture.
module tb_sfpu;
  import xem_pkg::*;
  import tb_fp_pkg::*;

  localparam int STAGES = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  xop_e        op;
  rm_e         rm;
  logic [31:0] a0, a1, c0, c1, res0, res1;
  logic [63:0] b;
  fflags_t     flags;
  int checks = 0, failures = 0, cycle = 0;

  sfpu #(.STAGES(STAGES)) dut (.*);

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

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (qe.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        ex = qe.pop_front();
        du = qd.pop_front();
        if (du != cycle || {res1, res0} !== ex) begin
          failures++;
          $display("FAIL result %h exp %h at cycle %0d due %0d", {res1, res0}, ex, cycle, du);
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
    in_valid = 0; op = OP_ADD; rm = RM_RNE; a0 = 0; a1 = 0; b = 0; c0 = 0; c1 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op = xop_e'($urandom_range(0, 3));
      x0 = rint(-500, 500); x1 = rint(-500, 500); y0 = rint(-500, 500); y1 = rint(-500, 500);
      z0 = rint(-999, 999); z1 = rint(-999, 999);
      a0 = r2f(x0); a1 = r2f(x1); b = {r2f(y1), r2f(y0)}; c0 = r2f(z0); c1 = r2f(z1);
      // lane 0 uses hi(b) = y1, lane 1 uses lo(b) = y0
      case (op)
        OP_ADD: e = {r2f(x1 + y0), r2f(x0 + y1)};
        OP_SUB: e = {r2f(x1 - y0), r2f(x0 - y1)};
        OP_MUL: e = {r2f(x1 * y0), r2f(x0 * y1)};
        default: e = {r2f(x1 * y0 + z1), r2f(x0 * y1 + z0)};
      endcase
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
