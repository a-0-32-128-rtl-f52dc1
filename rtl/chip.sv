// chip: one accelerator die. It runs small networks on its own and is the
// single building block of the multi-chip module.
//
// Network-on-chip: a 4 x 5 mesh of 5-port routers (ports N, E, S, W, local).
//   rows 0..3   : the 4 x 4 array of processing elements, PE id = 4*row + col
//   row 4       : global-buffer ports 16, 17, 18 (columns 0..2) and the
//                 RISC-V processor port 19 (column 3)
//   north edge  : column k connects to local port 4+k of the NoP router
//   south edge  : column 0 connects to the GPIO host interface (id 20)
// NoC routing is dimension-ordered (X, then Y) to a coordinate per
// destination; traffic for other chips goes to virtual row -1, i.e. up its
// own column into the NoP router, and the NoP router hands traffic for this
// chip to the column of its destination.
// Network-on-package router: 8 ports, 0..3 = GRS links N, E, S, W to the
// neighbouring dice, 4..7 = the four NoC columns; chips are routed X then Y on
// the MESH_X-wide chip mesh. Multicast follows these unicast routes.
// The routing tables are computed from the chip id (my_chip); in the
// published chip they are loaded through JTAG.
// GRS: 4 transmitters and 4 receivers, one pair per mesh direction, with the
// credit counts of each receiver handed to the transmitter of the same
// direction through cdc_count_sync.
// The RISC-V processor is not part of this RTL; its network port is brought
// out (rvp_*), so a host model or a processor can be attached there.
// Clocks: clk for routers, PEs, GB and GPIO; bclk for the GRS transmitters;
// rx_clk[d] (forwarded by the neighbour) for each GRS receiver. rst_n is
// synchronised into bclk. The published chip has a separate adaptive clock
// per partition; one core clock is this design's simplification.
module chip
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 6   // chips per row of the package mesh
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bclk,
  input  logic [CHIP_ID_W-1:0] my_chip,
  // GRS links, index 0 N, 1 E, 2 S, 3 W
  output logic [3:0]           grs_tx_data [4],
  output logic                 grs_tx_clk  [4],
  input  logic [3:0]           grs_rx_data [4],
  input  logic                 grs_rx_clk  [4],
  // RISC-V processor network port
  input  flit_t                rvp_tx_flit,
  input  logic                 rvp_tx_valid,
  output logic                 rvp_tx_credit,
  output flit_t                rvp_rx_flit,
  output logic                 rvp_rx_valid,
  input  logic                 rvp_rx_credit,
  // GPIO host interface
  output logic                 gpio_clk,
  input  logic [15:0]          h2c_data,
  input  logic                 h2c_valid,
  output logic                 h2c_ready,
  output logic [15:0]          c2h_data,
  output logic                 c2h_valid,
  input  logic                 c2h_ready,
  output logic [15:0]          pe_busy,
  output logic                 gb_busy
);
  localparam int NX = 4, NY = 5, NR = NX * NY;
  localparam int N = 0, E = 1, S = 2, W = 3, L = 4;

  // ---------------- routing tables ----------------
  function automatic int dest_x(int d);
    if (d < 16)  return d % 4;
    if (d < 19)  return d - 16;
    if (d == 19) return 3;
    return 0;
  endfunction
  function automatic int dest_y(int d);
    if (d < 16)  return d / 4;
    if (d < 20)  return 4;
    return 5;
  endfunction
  function automatic logic [PORT_ID_W-1:0] xy_port(int x, int y, int dx, int dy);
    if (dx > x) return PORT_ID_W'(E);
    if (dx < x) return PORT_ID_W'(W);
    if (dy < y) return PORT_ID_W'(N);
    if (dy > y) return PORT_ID_W'(S);
    return PORT_ID_W'(L);
  endfunction

  logic [PORT_ID_W-1:0] noc_chip_tbl [NR][NCHIP_MAX];
  logic [PORT_ID_W-1:0] noc_dest_tbl [NR][32];
  logic [PORT_ID_W-1:0] nop_chip_tbl [NCHIP_MAX];
  logic [PORT_ID_W-1:0] nop_dest_tbl [32];

  always_comb begin
    int mx, my;
    mx = int'(my_chip) % int'(MESH_X);
    my = int'(my_chip) / int'(MESH_X);
    for (int r = 0; r < NR; r++) begin
      for (int c = 0; c < NCHIP_MAX; c++) noc_chip_tbl[r][c] = xy_port(r % NX, r / NX, r % NX, -1);
      for (int d = 0; d < 32; d++)
        noc_dest_tbl[r][d] = (d < NNOC_DEST) ? xy_port(r % NX, r / NX, dest_x(d), dest_y(d)) : 4'hF;
    end
    for (int c = 0; c < NCHIP_MAX; c++) begin
      int cx, cy;
      cx = c % int'(MESH_X);
      cy = c / int'(MESH_X);
      if (cx > mx)      nop_chip_tbl[c] = PORT_ID_W'(E);
      else if (cx < mx) nop_chip_tbl[c] = PORT_ID_W'(W);
      else if (cy > my) nop_chip_tbl[c] = PORT_ID_W'(S);
      else if (cy < my) nop_chip_tbl[c] = PORT_ID_W'(N);
      else              nop_chip_tbl[c] = 4'hF;
    end
    for (int d = 0; d < 32; d++)
      nop_dest_tbl[d] = (d < NNOC_DEST) ? PORT_ID_W'(4 + dest_x(d)) : 4'hF;
  end

  // ---------------- NoC mesh ----------------
  flit_t       r_in_flit  [NR][5];
  flit_t       r_out_flit [NR][5];
  logic [4:0]  r_in_valid [NR], r_in_credit [NR], r_out_valid [NR], r_out_credit [NR];

  // NoP router
  flit_t       p_in_flit  [8];
  flit_t       p_out_flit [8];
  logic [7:0]  p_in_valid, p_in_credit, p_out_valid, p_out_credit;

  // endpoint signals, indexed by NoC id
  flit_t       ep_tx_flit [21];    // endpoint -> router
  logic [20:0] ep_tx_valid, ep_tx_credit;
  flit_t       ep_rx_flit [21];    // router -> endpoint
  logic [20:0] ep_rx_valid, ep_rx_credit;

  for (genvar r = 0; r < NR; r++) begin : g_r
    localparam int X = r % NX, Y = r / NX;
    localparam int EP = (Y < 4) ? r : (X < 3 ? 16 + X : 19);
    noc_router #(.NPORTS(5)) u_router (
      .clk, .rst_n, .my_chip, .chip_route(noc_chip_tbl[r]), .noc_route(noc_dest_tbl[r]),
      .in_flit(r_in_flit[r]), .in_valid(r_in_valid[r]), .in_credit(r_in_credit[r]),
      .out_flit(r_out_flit[r]), .out_valid(r_out_valid[r]), .out_credit(r_out_credit[r]));

    // north
    if (Y > 0) begin : g_n
      assign r_in_flit[r][N]    = r_out_flit[r - NX][S];
      assign r_in_valid[r][N]   = r_out_valid[r - NX][S];
      assign r_out_credit[r][N] = r_in_credit[r - NX][S];
    end else begin : g_n_nop
      assign r_in_flit[r][N]    = p_out_flit[4 + X];
      assign r_in_valid[r][N]   = p_out_valid[4 + X];
      assign r_out_credit[r][N] = p_in_credit[4 + X];
      assign p_in_flit[4 + X]    = r_out_flit[r][N];
      assign p_in_valid[4 + X]   = r_out_valid[r][N];
      assign p_out_credit[4 + X] = r_in_credit[r][N];
    end
    // south
    if (Y < NY - 1) begin : g_s
      assign r_in_flit[r][S]    = r_out_flit[r + NX][N];
      assign r_in_valid[r][S]   = r_out_valid[r + NX][N];
      assign r_out_credit[r][S] = r_in_credit[r + NX][N];
    end else if (X == 0) begin : g_s_gpio
      assign r_in_flit[r][S]    = ep_tx_flit[20];
      assign r_in_valid[r][S]   = ep_tx_valid[20];
      assign ep_tx_credit[20]   = r_in_credit[r][S];
      assign ep_rx_flit[20]     = r_out_flit[r][S];
      assign ep_rx_valid[20]    = r_out_valid[r][S];
      assign r_out_credit[r][S] = ep_rx_credit[20];
    end else begin : g_s_none
      assign r_in_flit[r][S]    = '0;
      assign r_in_valid[r][S]   = 1'b0;
      assign r_out_credit[r][S] = 1'b0;
    end
    // east
    if (X < NX - 1) begin : g_e
      assign r_in_flit[r][E]    = r_out_flit[r + 1][W];
      assign r_in_valid[r][E]   = r_out_valid[r + 1][W];
      assign r_out_credit[r][E] = r_in_credit[r + 1][W];
    end else begin : g_e_none
      assign r_in_flit[r][E]    = '0;
      assign r_in_valid[r][E]   = 1'b0;
      assign r_out_credit[r][E] = 1'b0;
    end
    // west
    if (X > 0) begin : g_w
      assign r_in_flit[r][W]    = r_out_flit[r - 1][E];
      assign r_in_valid[r][W]   = r_out_valid[r - 1][E];
      assign r_out_credit[r][W] = r_in_credit[r - 1][E];
    end else begin : g_w_none
      assign r_in_flit[r][W]    = '0;
      assign r_in_valid[r][W]   = 1'b0;
      assign r_out_credit[r][W] = 1'b0;
    end
    // local endpoint
    assign r_in_flit[r][L]    = ep_tx_flit[EP];
    assign r_in_valid[r][L]   = ep_tx_valid[EP];
    assign ep_tx_credit[EP]   = r_in_credit[r][L];
    assign ep_rx_flit[EP]     = r_out_flit[r][L];
    assign ep_rx_valid[EP]    = r_out_valid[r][L];
    assign r_out_credit[r][L] = ep_rx_credit[EP];
  end

  // ---------------- processing elements ----------------
  for (genvar i = 0; i < 16; i++) begin : g_pe
    pe u_pe (
      .clk, .rst_n, .my_chip, .my_noc(5'(i)),
      .in_flit(ep_rx_flit[i]), .in_valid(ep_rx_valid[i]), .in_credit(ep_rx_credit[i]),
      .out_flit(ep_tx_flit[i]), .out_valid(ep_tx_valid[i]), .out_credit(ep_tx_credit[i]),
      .busy(pe_busy[i]));
  end

  // ---------------- global buffer ----------------
  flit_t      gb_in [3], gb_out [3];
  logic [2:0] gb_iv, gb_ic, gb_ov, gb_oc;
  for (genvar k = 0; k < 3; k++) begin : g_gbp
    assign gb_in[k]             = ep_rx_flit[16 + k];
    assign gb_iv[k]             = ep_rx_valid[16 + k];
    assign ep_rx_credit[16 + k] = gb_ic[k];
    assign ep_tx_flit[16 + k]   = gb_out[k];
    assign ep_tx_valid[16 + k]  = gb_ov[k];
    assign gb_oc[k]             = ep_tx_credit[16 + k];
  end
  global_buffer u_gb (
    .clk, .rst_n, .my_chip, .my_noc(5'd16),
    .in_flit(gb_in), .in_valid(gb_iv), .in_credit(gb_ic),
    .out_flit(gb_out), .out_valid(gb_ov), .out_credit(gb_oc), .busy(gb_busy));

  // ---------------- RISC-V processor port ----------------
  assign ep_tx_flit[19]   = rvp_tx_flit;
  assign ep_tx_valid[19]  = rvp_tx_valid;
  assign rvp_tx_credit    = ep_tx_credit[19];
  assign rvp_rx_flit      = ep_rx_flit[19];
  assign rvp_rx_valid     = ep_rx_valid[19];
  assign ep_rx_credit[19] = rvp_rx_credit;

  // ---------------- GPIO ----------------
  gpio_if #(.GPIO_W(16), .DIV(4)) u_gpio (
    .clk, .rst_n, .gpio_clk,
    .h2c_data, .h2c_valid, .h2c_ready, .c2h_data, .c2h_valid, .c2h_ready,
    .out_flit(ep_tx_flit[20]), .out_valid(ep_tx_valid[20]), .out_credit(ep_tx_credit[20]),
    .in_flit(ep_rx_flit[20]), .in_valid(ep_rx_valid[20]), .in_credit(ep_rx_credit[20]));

  // ---------------- NoP router and GRS links ----------------
  noc_router #(.NPORTS(8)) u_nop (
    .clk, .rst_n, .my_chip, .chip_route(nop_chip_tbl), .noc_route(nop_dest_tbl),
    .in_flit(p_in_flit), .in_valid(p_in_valid), .in_credit(p_in_credit),
    .out_flit(p_out_flit), .out_valid(p_out_valid), .out_credit(p_out_credit));

  logic brst_q1, brst_n;
  always_ff @(posedge bclk or negedge rst_n)
    if (!rst_n) {brst_n, brst_q1} <= 2'b00;
    else        {brst_n, brst_q1} <= {brst_q1, 1'b1};

  for (genvar d = 0; d < 4; d++) begin : g_grs
    logic [10:0] cred_rx, cred_b, freed, freed_b;
    grs_tx u_tx (
      .clk, .rst_n, .in_flit(p_out_flit[d]), .in_valid(p_out_valid[d]), .in_credit(p_out_credit[d]),
      .bclk, .brst_n, .cred_rcvd(cred_b), .rx_freed(freed_b),
      .tx_data(grs_tx_data[d]), .tx_clk(grs_tx_clk[d]));
    grs_rx u_rx (
      .rx_clk(grs_rx_clk[d]), .rx_rst_n(rst_n), .rx_data(grs_rx_data[d]), .cred_rcvd(cred_rx),
      .clk, .rst_n, .out_flit(p_in_flit[d]), .out_valid(p_in_valid[d]), .out_credit(p_in_credit[d]),
      .rx_freed(freed));
    cdc_count_sync #(.W(11)) u_cred_sync (
      .src_clk(grs_rx_clk[d]), .src_rst_n(rst_n), .src_val(cred_rx),
      .dst_clk(bclk), .dst_rst_n(brst_n), .dst_val(cred_b));
    cdc_count_sync #(.W(11)) u_free_sync (
      .src_clk(clk), .src_rst_n(rst_n), .src_val(freed),
      .dst_clk(bclk), .dst_rst_n(brst_n), .dst_val(freed_b));
  end
endmodule
