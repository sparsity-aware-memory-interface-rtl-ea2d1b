// tb_sxornet_lut -- self-checking test of the stacked XOR LUT with shift registers.
// Drives random compressed vectors, LUT selects and shift enables, keeps its own
// history of the last two shifted vectors and compares every output with the
// reference XOR network of tb_ref_pkg; also checks that clr empties the history.
module tb_sxornet_lut;
  import tb_ref_pkg::*;
  localparam int unsigned X = 20, SR = 2, YH = 40, YF = 80;
  localparam logic [31:0] SEED = 32'h5A17_C0DE;

  logic clk = 0, rst_n = 0, clr = 0, adv = 0, half = 0;
  logic [X-1:0] u = '0;
  logic [YF-1:0] v;
  int checks = 0, failures = 0;
  longint unsigned h1 = 0, h2 = 0;   // u one and two shifts ago

  sxornet_lut dut (.clk, .rst_n, .clr, .adv, .u, .half, .v);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [127:0] exp;
    exp = ref_lut(SEED, 64'(u) | (h1 << X) | (h2 << (2 * X)), X * (SR + 1), YH, YF, half);
    checks++;
    if (v !== exp[YF-1:0]) begin
      failures++;
      if (failures < 10) $display("mismatch u=%h half=%0d v=%h exp=%h", u, half, v, exp[YF-1:0]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      u = X'($urandom); half = $urandom_range(0, 1); adv = ($urandom_range(0, 3) != 0);
      clr = (t == 250);
      #1 check_now();
      @(posedge clk);
      if (clr)      begin h1 = 0; h2 = 0; end
      else if (adv) begin h2 = h1; h1 = 64'(u); end
    end
    // after clr with no shifts the history must be empty
    @(negedge clk); adv = 0; clr = 1; @(posedge clk); @(negedge clk); clr = 0; h1 = 0; h2 = 0;
    u = 20'hA5C3F; half = 0; #1 check_now();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
