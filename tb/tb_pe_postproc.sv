// tb_pe_postproc: test of the PE output stage (bias add, scale multiply,
// arithmetic right shift, ReLU, saturation to int8) against a reference
// computed in the testbench with 64-bit integers. Random operands plus the
// saturation edges and negative values with and without ReLU.
module tb_pe_postproc;
  logic signed [23:0] acc, bias;
  logic        [7:0]  scale;
  logic        [4:0]  shift;
  logic               relu;
  logic signed [7:0]  y;
  int checks = 0, failures = 0;

  pe_postproc #(.ACC_W(24), .DW(8)) dut (.acc, .bias, .scale, .shift, .relu, .y);

  task automatic apply_and_check();
    longint v;
    logic signed [7:0] e;
    #1;
    v = ((longint'(acc) + longint'(bias)) * longint'(scale)) >>> shift;
    if (relu && v < 0) v = 0;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    e = 8'(v);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%0d bias=%0d scale=%0d shift=%0d relu=%0d: got %0d expected %0d",
                                  acc, bias, scale, shift, relu, y, e);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      acc   = 24'($urandom);
      bias  = 24'($urandom);
      scale = 8'($urandom);
      shift = 5'($urandom_range(8, 24));
      relu  = 1'($urandom);
      apply_and_check();
    end
    // small values that stay inside int8
    for (int t = 0; t < 2000; t++) begin
      acc   = 24'($signed($urandom_range(0, 4000)) - 2000);
      bias  = 24'($signed($urandom_range(0, 200)) - 100);
      scale = 8'($urandom_range(1, 8));
      shift = 5'($urandom_range(0, 6));
      relu  = 1'($urandom);
      apply_and_check();
    end
    acc = 24'sh7FFFFF; bias = 24'sh7FFFFF; scale = 8'hFF; shift = 5'd0; relu = 1'b0; apply_and_check();
    acc = -24'sh800000; bias = -24'sh800000; scale = 8'hFF; shift = 5'd0; relu = 1'b0; apply_and_check();
    acc = -24'sd1000; bias = 24'sd0; scale = 8'd1; shift = 5'd0; relu = 1'b1; apply_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
