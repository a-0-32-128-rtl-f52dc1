// tb_chip: end-to-end test of one chip: a 3x3, 32-to-32-channel convolution
// mapped over all 16 PEs with the global buffer, driven through the RISC-V
// processor port and the GPIO host interface (see tb_layer_body.svh).
module tb_chip;
  import noc_pkg::*;
  localparam int NCH = 1;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #500 clk = ~clk;
  logic bclk = 0;
  always #20 bclk = ~bclk;

  flit_t rvp_tx_flit0, rvp_rx_flit0;
  logic  rvp_tx_valid0, rvp_tx_credit0, rvp_rx_valid0, rvp_rx_credit0;
  logic  gpio_clk, h2c_valid, h2c_ready, c2h_valid, c2h_ready;
  logic [15:0] h2c_data, c2h_data, pe_busy;
  logic  gb_busy;
  logic [3:0] grs_tx_data [4], grs_rx_data [4];
  logic  grs_tx_clk [4], grs_rx_clk [4];
  always_comb for (int d = 0; d < 4; d++) begin grs_rx_data[d] = '0; grs_rx_clk[d] = 1'b0; end

  chip dut (.clk, .rst_n, .bclk, .my_chip(6'd0), .grs_tx_data, .grs_tx_clk, .grs_rx_data, .grs_rx_clk,
            .rvp_tx_flit(rvp_tx_flit0), .rvp_tx_valid(rvp_tx_valid0), .rvp_tx_credit(rvp_tx_credit0),
            .rvp_rx_flit(rvp_rx_flit0), .rvp_rx_valid(rvp_rx_valid0), .rvp_rx_credit(rvp_rx_credit0),
            .gpio_clk, .h2c_data, .h2c_valid, .h2c_ready, .c2h_data, .c2h_valid, .c2h_ready,
            .pe_busy, .gb_busy);
  logic g_tick;
  assign g_tick = dut.u_gpio.tick;

  // mechanism monitors
  for (genvar r = 0; r < 20; r++) begin : g_mon
    always @(posedge clk) begin
      for (int p = 0; p < 5; p++)
        if (dut.g_r[r].u_router.out_valid[p] && dut.g_r[r].u_router.out_flit[p].head &&
            dut.g_r[r].u_router.out_flit[p].data[63]) n_mcast_hops++;
      for (int i = 0; i < 5; i++)
        if (dut.g_r[r].u_router.nonempty[i] && dut.g_r[r].u_router.head[i].head &&
            !dut.g_r[r].u_router.active[i] && !dut.g_r[r].u_router.grant[i]) n_credit_holds++;
    end
  end
  for (genvar i = 0; i < 16; i++) begin : g_pmon
    always @(posedge clk)
      if (dut.g_pe[i].u_pe.in_valid && dut.g_pe[i].u_pe.rx_state == 2'd1 &&
          dut.g_pe[i].u_pe.rx_hdr.ptype == PT_STREAM && dut.g_pe[i].u_pe.in_flit.data[63:62] == 2'd3) n_psum_pkts++;
  end
  always @(posedge clk) if (dut.g_pe[0].u_pe.state == 3'd2) mac_cycles_pe0++;
  always @(posedge clk) if (dut.u_gb.wreq != dut.u_gb.mem_w_port) n_bank_conflicts++;

  `define EXTRA_CHECKS
  `include "tb/tb_layer_body.svh"

  initial begin
    #(64'd4000000000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
