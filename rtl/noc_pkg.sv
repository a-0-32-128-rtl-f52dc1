// noc_pkg: flit and header formats shared by the on-chip network (NoC), the
// network-on-package (NoP) and every unit attached to them.
//
// A flit is 66 bits: 64 data bits plus a header bit and a tail bit. A header
// flit with the tail bit set is a single-flit packet. The first flit of a packet
// carries routing: one bit selects unicast or multicast. Multicast addresses are
// one-hot: 36 chip bits and 20 NoC-destination bits (56 bits). Unicast addresses
// are binary: 6 bits of chip and 5 bits of NoC destination. These widths follow
// the published format; the placement of the fields inside the 64 bits, the
// 2-bit packet type and the 5-bit payload length field (needed by cut-through
// allocation) are this design's choices.
//
// Payload flit 0 of every non-interrupt packet is a "meta" word that carries the
// local address, so that multicast packets (whose header is full) can still
// address a location at the receiver.
package noc_pkg;

  localparam int unsigned FLIT_DATA_W = 64;
  localparam int unsigned FLIT_W      = 66;
  localparam int unsigned NCHIP_MAX   = 36;   // one-hot chip field width
  localparam int unsigned NNOC_MAX    = 20;   // one-hot NoC destination field width
  localparam int unsigned CHIP_ID_W   = 6;
  localparam int unsigned NOC_ID_W    = 5;
  localparam int unsigned MAX_PAYLOAD = 16;   // 17-flit packets: 1 header + 16 payload
  localparam int unsigned PORT_ID_W   = 4;    // router port index in routing tables

  // NoC destinations inside one chip.
  localparam int unsigned NOC_PE0  = 0;    // PEs 0..15
  localparam int unsigned NOC_GB0  = 16;   // global buffer ports 16..18
  localparam int unsigned NOC_RVP  = 19;   // RISC-V processor
  localparam int unsigned NOC_GPIO = 20;   // host interface (unicast only)
  localparam int unsigned NNOC_DEST = 21;

  typedef enum logic [1:0] {
    PT_STREAM = 2'd0,   // activations, partial sums
    PT_INTR   = 2'd1,   // single-flit interrupt
    PT_AXI    = 2'd2,   // register / memory access
    PT_RSVD   = 2'd3
  } ptype_e;

  typedef struct packed {
    logic       head;
    logic       tail;
    logic [63:0] data;
  } flit_t;

  // Header word. For multicast, dest holds {chip_mask[35:0], noc_mask[19:0]}.
  // For unicast, dest[10:5] is the chip, dest[4:0] the NoC destination,
  // dest[21:16] / dest[15:11] the source chip / NoC id and dest[28:22] an
  // interrupt line number.
  typedef struct packed {
    logic        mcast;
    ptype_e      ptype;
    logic [4:0]  len;     // payload flits following the header, 0..16
    logic [55:0] dest;
  } hdr_t;

  // Meta word (payload flit 0).
  typedef enum logic [1:0] {
    OP_WRITE = 2'd0,  // AXI write / stream write of the following words
    OP_READ  = 2'd1,  // AXI read request, burst words returned
    OP_RESP  = 2'd2,  // AXI read response
    OP_PSUM  = 2'd3   // stream of partial sums (3 flits per accumulator row)
  } op_e;

  typedef struct packed {
    op_e         op;
    logic [2:0]  burst_m1;  // AXI burst length minus one (up to 8 words)
    logic [26:0] rsvd;
    logic [31:0] addr;      // local word address at the receiver
  } meta_t;

  function automatic hdr_t mk_ucast(ptype_e t, logic [4:0] len,
                                    logic [5:0] chip, logic [4:0] noc,
                                    logic [5:0] src_chip, logic [4:0] src_noc,
                                    logic [6:0] irq);
    hdr_t h;
    h = '0;
    h.mcast = 1'b0;
    h.ptype = t;
    h.len   = len;
    h.dest[10:5]  = chip;
    h.dest[4:0]   = noc;
    h.dest[15:11] = src_noc;
    h.dest[21:16] = src_chip;
    h.dest[28:22] = irq;
    return h;
  endfunction

  function automatic hdr_t mk_mcast(ptype_e t, logic [4:0] len,
                                    logic [35:0] chips, logic [19:0] nocs);
    hdr_t h;
    h.mcast = 1'b1;
    h.ptype = t;
    h.len   = len;
    h.dest  = {chips, nocs};
    return h;
  endfunction

  function automatic meta_t mk_meta(op_e op, logic [2:0] burst_m1, logic [31:0] addr);
    meta_t m;
    m = '0;
    m.op = op;
    m.burst_m1 = burst_m1;
    m.addr = addr;
    return m;
  endfunction

endpackage
