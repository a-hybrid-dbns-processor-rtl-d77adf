// tb_sign_fix: checks the sign/zero fix-up of a product for all flag
// combinations over random magnitudes.
module tb_sign_fix;
  int checks = 0, failures = 0;
  localparam int W = 24;

  logic [W-1:0]        mag;
  logic                zd, nd, zc, nc;
  logic signed [W-1:0] prod;
  longint              exp_v;

  sign_fix #(.W(W)) dut (.mag(mag), .zero_d(zd), .neg_d(nd), .zero_c(zc), .neg_c(nc), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      mag = W'($urandom_range(0, (1 << (W - 1)) - 1));
      for (int f = 0; f < 16; f++) begin
        {zd, nd, zc, nc} = 4'(f);
        #1;
        if (zd || zc) exp_v = 0;
        else if (nd != nc) exp_v = -longint'(mag);
        else exp_v = longint'(mag);
        checks++;
        if (longint'(prod) != exp_v) begin
          failures++;
          $display("mag=%0d flags=%b prod=%0d expected %0d", mag, f[3:0], prod, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
