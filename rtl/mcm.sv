// mcm: the multi-chip module. NCX x NCY identical dice (6 x 6 = 36 by
// default) on one package, each connected to its mesh neighbours by a pair of
// unidirectional GRS links (4 data wires plus a forwarded clock per direction).
// Chip c sits at column c % NCX, row c / NCX; its id is strapped by position.
// Networks scale hierarchically: each die's NoP router joins the package mesh,
// and each die's NoC hangs below its NoP router.
// The host talks to the package through the GPIO interface of chip 0; the
// other GPIO interfaces are idle. Every die's RISC-V processor network port is
// brought out (rvp_*), since the processor is not part of this RTL: a lead
// processor (or a model of one) drives chip 0's port, worker processors the
// others. All dice share the core clock and the GRS bit clock here.
module mcm
  import noc_pkg::*;
#(
  parameter int unsigned NCX = 6,
  parameter int unsigned NCY = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bclk,
  input  flit_t       rvp_tx_flit   [NCX*NCY],
  input  logic        rvp_tx_valid  [NCX*NCY],
  output logic        rvp_tx_credit [NCX*NCY],
  output flit_t       rvp_rx_flit   [NCX*NCY],
  output logic        rvp_rx_valid  [NCX*NCY],
  input  logic        rvp_rx_credit [NCX*NCY],
  output logic        gpio_clk,
  input  logic [15:0] h2c_data,
  input  logic        h2c_valid,
  output logic        h2c_ready,
  output logic [15:0] c2h_data,
  output logic        c2h_valid,
  input  logic        c2h_ready,
  output logic [15:0] pe_busy [NCX*NCY],
  output logic        gb_busy [NCX*NCY]
);
  localparam int NC = NCX * NCY;
  logic [3:0] tx_data [NC][4];
  logic       tx_clk  [NC][4];
  logic [3:0] rx_data [NC][4];
  logic       rx_clk  [NC][4];

  for (genvar c = 0; c < NC; c++) begin : g_chip
    localparam int CX = c % NCX, CY = c / NCX;
    logic        g_clk, g_ready, g_valid;
    logic [15:0] g_data;
    chip #(.MESH_X(NCX)) u_chip (
      .clk, .rst_n, .bclk, .my_chip(CHIP_ID_W'(c)),
      .grs_tx_data(tx_data[c]), .grs_tx_clk(tx_clk[c]),
      .grs_rx_data(rx_data[c]), .grs_rx_clk(rx_clk[c]),
      .rvp_tx_flit(rvp_tx_flit[c]), .rvp_tx_valid(rvp_tx_valid[c]), .rvp_tx_credit(rvp_tx_credit[c]),
      .rvp_rx_flit(rvp_rx_flit[c]), .rvp_rx_valid(rvp_rx_valid[c]), .rvp_rx_credit(rvp_rx_credit[c]),
      .gpio_clk(g_clk),
      .h2c_data(c == 0 ? h2c_data : 16'd0), .h2c_valid(c == 0 ? h2c_valid : 1'b0), .h2c_ready(g_ready),
      .c2h_data(g_data), .c2h_valid(g_valid), .c2h_ready(c == 0 ? c2h_ready : 1'b0),
      .pe_busy(pe_busy[c]), .gb_busy(gb_busy[c]));
    if (c == 0) begin : g_host
      assign gpio_clk  = g_clk;
      assign h2c_ready = g_ready;
      assign c2h_data  = g_data;
      assign c2h_valid = g_valid;
    end
    // receivers: from the neighbour's transmitter facing this chip
    // (0 N, 1 E, 2 S, 3 W; the opposite direction is (d + 2) % 4)
    if (CY > 0) begin : g_n
      assign rx_data[c][0] = tx_data[c - NCX][2];
      assign rx_clk[c][0]  = tx_clk[c - NCX][2];
    end else begin : g_n0
      assign rx_data[c][0] = '0;
      assign rx_clk[c][0]  = 1'b0;
    end
    if (CX < NCX - 1) begin : g_e
      assign rx_data[c][1] = tx_data[c + 1][3];
      assign rx_clk[c][1]  = tx_clk[c + 1][3];
    end else begin : g_e0
      assign rx_data[c][1] = '0;
      assign rx_clk[c][1]  = 1'b0;
    end
    if (CY < NCY - 1) begin : g_s
      assign rx_data[c][2] = tx_data[c + NCX][0];
      assign rx_clk[c][2]  = tx_clk[c + NCX][0];
    end else begin : g_s0
      assign rx_data[c][2] = '0;
      assign rx_clk[c][2]  = 1'b0;
    end
    if (CX > 0) begin : g_w
      assign rx_data[c][3] = tx_data[c - 1][1];
      assign rx_clk[c][3]  = tx_clk[c - 1][1];
    end else begin : g_w0
      assign rx_data[c][3] = '0;
      assign rx_clk[c][3]  = 1'b0;
    end
  end
endmodule
