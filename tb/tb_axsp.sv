// tb_axsp: self-checking test of the scratchpad. Random 64-bit words are
// written through port C, then read back through C (one word) and through
// the 256-bit ports A and B (whole lines, in parallel), each one cycle after
// the request; read data must hold while no new read is made, and a line
// read in the cycle of a write must return the old contents.
//
// The port arrangement checked here is this design's own choice; only the
// capacity comes from the architecture.
module tb_axsp;
  localparam int BYTES = 256 * 1024;
  localparam int AW    = $clog2(BYTES);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          re_a, re_b, en_c, we_c;
  logic [AW-1:0] addr_a, addr_b, addr_c;
  logic [255:0]  rdata_a, rdata_b;
  logic [63:0]   wdata_c, rdata_c;
  int checks = 0, failures = 0;

  axsp dut (.*);

  logic [63:0] model [logic [AW-4:0]];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [255:0] line(input logic [AW-1:0] a);
    logic [255:0] l;
    for (int w = 0; w < 4; w++) l[64*w +: 64] = model[{a[AW-1:5], 2'(w)}];
    return l;
  endfunction

  logic [AW-1:0] lines [32];

  initial begin
    logic [255:0] old;
    re_a = 0; re_b = 0; en_c = 0; we_c = 0; addr_a = 0; addr_b = 0; addr_c = 0; wdata_c = 0;
    // fill 32 random lines, including the first and last of the memory
    for (int l = 0; l < 32; l++) begin
      lines[l] = (l == 0) ? '0 : (l == 1) ? AW'(BYTES - 32) : {AW'($urandom)} & ~AW'(31);
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        en_c = 1; we_c = 1; addr_c = lines[l] + AW'(8 * w); wdata_c = {$urandom, $urandom};
        model[addr_c[AW-1:3]] = wdata_c;
      end
    end
    @(negedge clk); en_c = 0; we_c = 0;
    for (int l = 0; l < 32; l++) begin
      int m = (l + 7) % 32;
      @(negedge clk);
      re_a = 1; addr_a = lines[l] + AW'($urandom_range(0, 31));   // low bits ignored
      re_b = 1; addr_b = lines[m];
      en_c = 1; we_c = 0; addr_c = lines[l] + AW'(8 * (l % 4)) + AW'($urandom_range(0, 7));
      @(negedge clk);
      re_a = 0; re_b = 0; en_c = 0;
      check("port A line", rdata_a, line(lines[l]));
      check("port B line", rdata_b, line(lines[m]));
      check("port C word", 256'(rdata_c), 256'(model[{lines[l][AW-1:5], 2'(l % 4)}]));
      @(negedge clk);
      check("port A holds", rdata_a, line(lines[l]));
    end
    // read during write returns old data
    @(negedge clk);
    old = line(lines[3]);
    re_a = 1; addr_a = lines[3];
    en_c = 1; we_c = 1; addr_c = lines[3]; wdata_c = 64'hDEAD_BEEF_0123_4567;
    model[addr_c[AW-1:3]] = wdata_c;
    @(negedge clk);
    re_a = 0; en_c = 0; we_c = 0;
    check("read-during-write old data", rdata_a, old);
    @(negedge clk);
    re_a = 1;
    @(negedge clk);
    re_a = 0;
    check("new data after write", rdata_a, line(lines[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
