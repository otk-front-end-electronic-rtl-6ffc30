`timescale 1ps/1ps
// taotie_tree: the two-level data aggregation of the tracker front end.
// N_GROUPS first-level TaoTie chips each collect N1 chip uplinks
// (43.3 Mbit/s each -> 347 Mbit/s); a second-level TaoTie collects the
// N_GROUPS first-level links into one 1.39 Gbit/s link (32 chips per
// link). Everything runs on one clock at the output rate: the second level
// steps every cycle, the first level every N_GROUPS cycles (enable ce1),
// and the chip links must change once every N1*N_GROUPS cycles. A first-level
// bit period is aligned so that the second level captures each first-level
// output in the cycle after it changed. Chip link j of group g is
// chip_links[g*N1 + j]. The tree shape and the rates follow the design
// description; the common-clock arrangement is this design's own.
module taotie_tree #(
  parameter int unsigned N1       = 8,
  parameter int unsigned N_GROUPS = 4
) (
  input  logic                   clk,       // output bit clock (1.39 GHz)
  input  logic                   rst_n,
  input  logic [N1*N_GROUPS-1:0] chip_links,
  output logic                   dout,
  output logic                   slot0,     // first bit of a second-level slot cycle
  output logic                   chip_slot  // cycle in which chip links are sampled
);
  localparam int unsigned DW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1;
  logic [DW-1:0]       div;
  logic                ce1;
  logic [N_GROUPS-1:0] l1_out;
  localparam int unsigned SW1 = (N1 > 1) ? $clog2(N1) : 1;
  logic [SW1-1:0]      l1_slot;   // copy of the first-level slot counter

  // first-level enable: one cycle in N_GROUPS, placed so that the second
  // level (which captures at its slot 0) sees settled first-level outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == DW'(N_GROUPS-1)) ? '0 : div + 1'b1;
  end
  assign ce1 = (div == DW'(N_GROUPS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   l1_slot <= '0;
    else if (ce1) l1_slot <= (l1_slot == SW1'(N1-1)) ? '0 : l1_slot + 1'b1;
  end

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_l1
    taotie #(.N_IN(N1)) u_l1 (
      .clk, .rst_n, .ce(ce1), .din(chip_links[g*N1 +: N1]), .dout(l1_out[g]), .slot0()
    );
  end

  taotie #(.N_IN(N_GROUPS)) u_l2 (
    .clk, .rst_n, .ce(1'b1), .din(l1_out), .dout, .slot0
  );

  assign chip_slot = ce1 && (l1_slot == '0);
endmodule
