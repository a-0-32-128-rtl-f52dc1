// tb_mcm: end-to-end test of the multi-chip package, reduced to 2x2 chips.
// Every chip runs the same 3x3, 32-to-32-channel convolution on its own band
// of output rows (see tb_layer_body.svh); chip 0's RISC-V port and the GPIO
// host interface drive the whole package over the network-on-package, so
// configuration, weights (multicast to all chips at once), activations,
// interrupts and read responses all cross the ground-referenced links.
// The bit clock runs 25x the core clock: about 25 Gb/s per wire next to a
// 1 GHz core, the top of the published link speed range (11-25 Gb/s).
module tb_mcm;
  import noc_pkg::*;
  localparam int NCX = 2, NCY = 2, NCH = NCX * NCY;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #500 clk = ~clk;
  logic bclk = 0;
  always #20 bclk = ~bclk;

  flit_t rvp_tx_flit [NCH], rvp_rx_flit [NCH];
  logic  rvp_tx_valid [NCH], rvp_tx_credit [NCH], rvp_rx_valid [NCH], rvp_rx_credit [NCH];
  flit_t rvp_tx_flit0, rvp_rx_flit0;
  logic  rvp_tx_valid0, rvp_tx_credit0, rvp_rx_valid0, rvp_rx_credit0;
  logic  gpio_clk, h2c_valid, h2c_ready, c2h_valid, c2h_ready;
  logic [15:0] h2c_data, c2h_data;
  logic [15:0] pe_busy [NCH];
  logic  gb_busy [NCH];
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      rvp_tx_flit[c]   = (c == 0) ? rvp_tx_flit0 : '0;
      rvp_tx_valid[c]  = (c == 0) ? rvp_tx_valid0 : 1'b0;
      rvp_rx_credit[c] = (c == 0) ? rvp_rx_credit0 : 1'b0;
    end
    rvp_tx_credit0 = rvp_tx_credit[0];
    rvp_rx_flit0   = rvp_rx_flit[0];
    rvp_rx_valid0  = rvp_rx_valid[0];
  end

  mcm #(.NCX(2), .NCY(2)) dut (.clk, .rst_n, .bclk, .rvp_tx_flit, .rvp_tx_valid, .rvp_tx_credit,
      .rvp_rx_flit, .rvp_rx_valid, .rvp_rx_credit, .gpio_clk, .h2c_data, .h2c_valid, .h2c_ready,
      .c2h_data, .c2h_valid, .c2h_ready, .pe_busy, .gb_busy);
  logic g_tick;
  assign g_tick = dut.g_chip[0].u_chip.u_gpio.tick;

  // mechanism monitors
  int n_partial = 0, n_nop_pkts = 0;
  for (genvar c = 0; c < NCH; c++) begin : g_cmon
    for (genvar r = 0; r < 20; r++) begin : g_mon
      always @(posedge clk) begin
        for (int p = 0; p < 5; p++)
          if (dut.g_chip[c].u_chip.g_r[r].u_router.out_valid[p] && dut.g_chip[c].u_chip.g_r[r].u_router.out_flit[p].head &&
              dut.g_chip[c].u_chip.g_r[r].u_router.out_flit[p].data[63]) n_mcast_hops++;
        for (int i = 0; i < 5; i++)
          if (dut.g_chip[c].u_chip.g_r[r].u_router.nonempty[i] && dut.g_chip[c].u_chip.g_r[r].u_router.head[i].head &&
              !dut.g_chip[c].u_chip.g_r[r].u_router.active[i] && !dut.g_chip[c].u_chip.g_r[r].u_router.grant[i]) n_credit_holds++;
      end
    end
    for (genvar i = 0; i < 16; i++) begin : g_pmon
      always @(posedge clk)
        if (dut.g_chip[c].u_chip.g_pe[i].u_pe.in_valid && dut.g_chip[c].u_chip.g_pe[i].u_pe.rx_state == 2'd1 &&
            dut.g_chip[c].u_chip.g_pe[i].u_pe.rx_hdr.ptype == PT_STREAM &&
            dut.g_chip[c].u_chip.g_pe[i].u_pe.in_flit.data[63:62] == 2'd3) n_psum_pkts++;
    end
    for (genvar d = 0; d < 4; d++) begin : g_lmon
      always @(posedge bclk)
        if (dut.g_chip[c].u_chip.g_grs[d].u_tx.run && dut.g_chip[c].u_chip.g_grs[d].u_tx.bc == 4'd0 &&
            dut.g_chip[c].u_chip.g_grs[d].u_tx.cur_word[62]) n_partial++;
      always @(posedge clk)
        if (dut.g_chip[c].u_chip.g_grs[d].u_tx.in_valid && dut.g_chip[c].u_chip.g_grs[d].u_tx.in_flit.head) n_nop_pkts++;
    end
    always @(posedge clk) if (dut.g_chip[c].u_chip.u_gb.wreq != dut.g_chip[c].u_chip.u_gb.mem_w_port) n_bank_conflicts++;
  end
  always @(posedge clk) if (dut.g_chip[0].u_chip.g_pe[0].u_pe.state == 3'd2) mac_cycles_pe0++;

  `define EXTRA_CHECKS \
    $display("link packets %0d, partial chunks %0d", n_nop_pkts, n_partial); \
    check(n_nop_pkts > 0, "packets crossed the package links"); \
    check(n_partial > 0, "partial chunks sent on the links");
  `include "tb/tb_layer_body.svh"

  initial begin
    #(64'd40000000000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
