// dst_pkg: types and constants shared by the dual-split intersection pipeline.
//
// A dual-split tree node begins with one 32-bit "header-offset" word: a 6-bit header in
// bits [31:26] and a 26-bit child/triangle offset in bits [25:0]. Internal nodes are followed
// by two single-precision planes. The header layout (bit 31 first) is:
//   leaf              0 x x x x 1
//   split             0 a a s s 0     aa = split axis, ss = left child size
//   single-axis carve 1 1 0 a a L     aa = carving axis, L = carving node acts as leaf
//   dual-axis carve   1 p p c c L     pp = axis pair 00 xy, 01 yz, 11 xz; cc = corner bits
// The field positions follow the published dual-split tree format; the numeric codes of the
// axes, axis pairs and corner bits are this design's choice (see dst_decode below).
package dst_pkg;

  typedef logic [31:0] f32_t;          // IEEE-754 single-precision bit pattern

  typedef struct packed {
    f32_t x;
    f32_t y;
    f32_t z;
  } vec3_t;

  // Node type derived from the header (the "node type*" flag of the selection logic).
  typedef enum logic [1:0] {
    NODE_SPLIT = 2'd0,
    NODE_CARVE1 = 2'd1,                  // single-axis carving node
    NODE_CARVE2 = 2'd2,                  // dual-axis carving node
    NODE_LEAF  = 2'd3
  } node_type_e;

  // Ray-relative corner case of a dual-axis carving node, numbered like the four panels of
  // the corner figure: both planes exits, plane 1 entry / plane 2 exit, the reverse, both entries.
  typedef enum logic [1:0] {
    CORNER_EXIT_EXIT   = 2'd0,
    CORNER_ENTRY_EXIT  = 2'd1,
    CORNER_EXIT_ENTRY  = 2'd2,
    CORNER_ENTRY_ENTRY = 2'd3
  } corner_e;

  localparam int HDR_W = 6;
  localparam int OFS_W = 26;
  localparam f32_t F32_QNAN = 32'h7FC0_0000;

  typedef struct packed {
    node_type_e  ntype;
    logic [1:0]  axis1;                  // 0 = x, 1 = y, 2 = z
    logic [1:0]  axis2;
    logic [1:0]  left_size;              // split only
    logic [1:0]  corner_bits;            // dual carve only: {plane2, plane1}, 1 = normal points -
    logic        leaf_bit;
  } hdr_info_t;

  // Header decode: the combinational "derived flags" of the selection logic.
  function automatic hdr_info_t dst_decode(input logic [HDR_W-1:0] h);
    hdr_info_t d;
    d.left_size   = h[2:1];
    d.corner_bits = h[2:1];
    d.leaf_bit    = h[0];
    d.axis1       = 2'd0;
    d.axis2       = 2'd0;
    if (!h[5]) begin
      d.ntype = h[0] ? NODE_LEAF : NODE_SPLIT;
      d.axis1 = h[4:3];
      d.axis2 = h[4:3];
    end else if (h[4:3] == 2'b10) begin
      d.ntype = NODE_CARVE1;             // type field 110
      d.axis1 = h[2:1];
      d.axis2 = h[2:1];
    end else begin
      d.ntype = NODE_CARVE2;
      unique case (h[4:3])
        2'b00:   begin d.axis1 = 2'd0; d.axis2 = 2'd1; end   // xy
        2'b01:   begin d.axis1 = 2'd1; d.axis2 = 2'd2; end   // yz
        default: begin d.axis1 = 2'd0; d.axis2 = 2'd2; end   // xz (code 11)
      endcase
    end
    return d;
  endfunction

  // Total-order key of a float: unsigned comparison of keys orders non-NaN floats, with
  // -0 and +0 mapped to the same key.
  function automatic logic [31:0] f32_key(input f32_t a);
    if (a[30:0] == 31'd0) return 32'h8000_0000;
    return a[31] ? ~a : (a | 32'h8000_0000);
  endfunction

  function automatic logic f32_is_nan(input f32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
  endfunction

endpackage
