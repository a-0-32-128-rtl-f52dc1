// tb_pe_vector_mac: random and corner-case test of the 8-wide int8 vector
// multiply-accumulate unit against a reference dot product computed with
// integer arithmetic in the testbench. Checks accumulation, the clear input,
// the all-extremes cases (-128 * -128 summed eight times) and 24-bit
// wrap-around. The unit is combinational; values are applied and checked
// one step at a time.
module tb_pe_vector_mac;
  localparam int VEC = 8, ACC_W = 24;
  logic signed [7:0]       act [VEC], wt [VEC];
  logic signed [ACC_W-1:0] acc_in, acc_out;
  logic                    clear;
  int checks = 0, failures = 0;

  pe_vector_mac #(.VEC(VEC), .DW(8), .ACC_W(ACC_W)) dut (.act, .wt, .acc_in, .clear, .acc_out);

  task automatic apply_and_check(string what);
    longint s;
    logic signed [ACC_W-1:0] e;
    #1;
    s = clear ? 0 : longint'(acc_in);
    for (int i = 0; i < VEC; i++) s += longint'(act[i]) * longint'(wt[i]);
    e = ACC_W'(s);
    checks++;
    if (acc_out !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, acc_out, e);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < VEC; i++) begin act[i] = 8'($urandom); wt[i] = 8'($urandom); end
      acc_in = ACC_W'($urandom);
      clear  = ($urandom_range(0, 3) == 0);
      apply_and_check("random");
    end
    for (int i = 0; i < VEC; i++) begin act[i] = -8'sd128; wt[i] = -8'sd128; end
    acc_in = '0; clear = 1'b0;
    apply_and_check("max products");
    #1 if (acc_out != 24'sd131072) begin failures++; $display("FAIL 8*16384"); end
    checks++;
    acc_in = 24'sh7FFFFF;
    apply_and_check("wrap");
    for (int i = 0; i < VEC; i++) begin act[i] = 8'sd127; wt[i] = -8'sd128; end
    acc_in = 24'sd5; clear = 1'b1;
    apply_and_check("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
