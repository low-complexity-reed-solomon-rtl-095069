// tb_rs_compensator: check of the two-multiplier shortened-code compensator.
//
// For random alpha^io (io = 255 - n), after `init` the k-th `step` must give
// comp = (alpha^io)^k, seen through coef_out with a coefficient input of 1,
// and coef_out must equal the selected input (Lambda or Omega) times that
// power. Steps come at random times; comp must not move without a step.
module tb_rs_compensator;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, step = 1'b0, sel_omega = 1'b0;
  gf_t  alpha_io = 8'd1, lam_in = 8'd1, omg_in = 8'd1, coef_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_compensator dut (
    .clk(clk), .rst_n(rst_n), .alpha_io(alpha_io), .init(init), .step(step),
    .sel_omega(sel_omega), .lam_in(lam_in), .omg_in(omg_in), .coef_out(coef_out)
  );

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      int n, k;
      n        = $urandom_range(17, 255);
      alpha_io = ralpha(255 - n);
      init     = 1'b1;
      @(negedge clk);
      init = 1'b0;
      k    = 0;
      for (int c = 0; c < 30; c++) begin
        sym_t p, x;
        p         = rpow(alpha_io, k);
        sel_omega = 1'($urandom_range(0, 1));
        lam_in    = 8'($urandom);
        omg_in    = 8'($urandom);
        #1;
        x = sel_omega ? omg_in : lam_in;
        checks++;
        if (coef_out !== rmul(x, p)) begin
          failures++;
          $display("ERROR: n=%0d k=%0d coef %02h exp %02h", n, k, coef_out, rmul(x, p));
        end
        step = 1'($urandom_range(0, 1));
        if (step) k++;
        @(negedge clk);
        step = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
