// tb_activation_unit: random bricks through the activation unit, with and
// without the rectifier and with random power-of-two scaling, compared with
// values computed in the testbench.
module tb_activation_unit;
  import stripes_pkg::*;
  logic relu;
  logic [3:0] scale_sh;
  logic [15:0][31:0] in_brick, out_brick;
  int checks = 0, failures = 0;

  activation_unit dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      relu = ($urandom % 2) == 1;
      scale_sh = ($urandom % 3 == 0) ? 4'($urandom) : 4'd0;
      for (int i = 0; i < 16; i++) in_brick[i] = $urandom;
      #1;
      for (int i = 0; i < 16; i++) begin
        longint v;
        v = longint'($signed(in_brick[i])) >>> scale_sh;
        if (relu && v < 0) v = 0;
        checks++;
        if (longint'($signed(out_brick[i])) != v) begin
          failures++; $display("FAIL lane %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
