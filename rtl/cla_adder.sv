// cla_adder: two-level carry look-ahead adder, 16 bits by default.
//
// The operands are cut into 4-bit groups, each a cla4 adder. The groups' propagate and generate
// outputs go to a second level of 4-bit look-ahead generators, which compute the carry into
// every group directly, so at the default width of 16 bits (four groups, one second-level
// generator) no carry ripples anywhere. For widths above 16 bits the second-level generators,
// each covering four groups, pass their carry from one to the next. There is no carry input;
// the result is one bit wider than the operands, its top bit being the carry out.
// Purely combinational. WIDTH must be a multiple of 4. The 16-bit width and the port names
// follow the reference design; building it from 4-bit groups with a second look-ahead level
// is the choice made here.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] i_add1,
  input  logic [WIDTH-1:0] i_add2,
  output logic [WIDTH:0]   o_result
);

  localparam int unsigned NG  = WIDTH / 4;         // 4-bit groups
  localparam int unsigned NSG = (NG + 3) / 4;      // second-level generators

  logic [NSG*4-1:0] grp_p, grp_g;                  // padded group propagate / generate
  logic [NSG*4-1:0] grp_c;                         // carry into each group
  logic [NSG:0]     sg_c;                          // carry into each second-level span
  logic [NG-1:0]    grp_c4;                        // group carry outs (unused: look-ahead wins)

  assign sg_c[0] = 1'b0;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla4 u_grp (
      .a  (i_add1[4*k +: 4]),
      .b  (i_add2[4*k +: 4]),
      .c0 (grp_c[k]),
      .s  (o_result[4*k +: 4]),
      .c4 (grp_c4[k]),
      .pg (grp_p[k]),
      .gg (grp_g[k])
    );
  end

  for (genvar k = NG; k < NSG * 4; k++) begin : g_pad
    assign grp_p[k] = 1'b0;
    assign grp_g[k] = 1'b0;
  end

  for (genvar s = 0; s < NSG; s++) begin : g_sg
    logic [4:1] c;
    logic       pg_unused, gg_unused;
    cla_lookahead4 u_lag (
      .p  (grp_p[4*s +: 4]),
      .g  (grp_g[4*s +: 4]),
      .c0 (sg_c[s]),
      .c  (c),
      .pg (pg_unused),
      .gg (gg_unused)
    );
    assign grp_c[4*s]     = sg_c[s];
    assign grp_c[4*s + 1] = c[1];
    assign grp_c[4*s + 2] = c[2];
    assign grp_c[4*s + 3] = c[3];
    assign sg_c[s + 1]    = c[4];
  end

  // Carry out of the top group, taken from the look-ahead network.
  assign o_result[WIDTH] = grp_c4[NG-1];

endmodule
