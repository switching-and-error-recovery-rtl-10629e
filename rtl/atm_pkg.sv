// atm_pkg: types and constants shared by the switch modules.
//
// A cell is 53 bytes (5 header + 48 payload) carried bit-serially. Inside the
// RTL a stored cell is a 424-bit vector whose index m is the arrival order of
// the bit: bit 0 arrives first. The UNI header occupies bits 0..39 in this
// order, each field most significant bit first: GFC (4), VPI (8), VCI (16),
// PTI (3), CLP (1), HEC (8). The field sizes are those of the ATM UNI header;
// the bit-order convention is this design's own.
//
// The HEC helper uses the standard ATM header check (CRC-8, x^8+x^2+x+1,
// result XORed with 0x55); it is used whenever a header is rewritten.
package atm_pkg;

  localparam int unsigned CELL_BITS = 53 * 8;    // 424 bits per cell
  localparam int unsigned HDR_BITS  = 40;        // 5-byte header
  localparam int unsigned BIT_W     = 9;         // width of a bit position 0..423

  // positions of the header fields in the arrival-ordered cell vector
  localparam int unsigned GFC_POS = 0;
  localparam int unsigned VPI_POS = 4;
  localparam int unsigned VCI_POS = 12;
  localparam int unsigned PTI_POS = 28;
  localparam int unsigned CLP_POS = 31;
  localparam int unsigned HEC_POS = 32;

  typedef logic [CELL_BITS-1:0] cell_t;

  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pti;
    logic        clp;
    logic [7:0]  hec;
  } uni_hdr_t;

  // kind of a connection in the input controller's table
  typedef enum logic [1:0] {
    CONN_USER   = 2'd0,   // switched to one or more output ports
    CONN_OAM    = 2'd1,   // handed to the OAM processor port
    CONN_SIGNAL = 2'd2    // handed to the call-control processor port
  } conn_kind_e;

  // Extract the header of an arrival-ordered cell (bits 0..39).
  function automatic uni_hdr_t get_hdr(input logic [HDR_BITS-1:0] h);
    logic [HDR_BITS-1:0] r;
    for (int i = 0; i < HDR_BITS; i++) r[HDR_BITS-1-i] = h[i];
    return uni_hdr_t'(r);
  endfunction

  // Inverse of get_hdr: header struct to arrival-ordered bits.
  function automatic logic [HDR_BITS-1:0] put_hdr(input uni_hdr_t hd);
    logic [HDR_BITS-1:0] r, o;
    r = hd;
    for (int i = 0; i < HDR_BITS; i++) o[i] = r[HDR_BITS-1-i];
    return o;
  endfunction

  // HEC over the first four header bytes (32 bits, first transmitted bit first).
  function automatic logic [7:0] hec8(input logic [31:0] msb_first);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ msb_first[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c ^ 8'h55;
  endfunction

  // Header with a recomputed HEC.
  function automatic uni_hdr_t with_hec(input uni_hdr_t hd);
    uni_hdr_t o;
    o = hd;
    o.hec = hec8({hd.gfc, hd.vpi, hd.vci, hd.pti, hd.clp});
    return o;
  endfunction

endpackage
