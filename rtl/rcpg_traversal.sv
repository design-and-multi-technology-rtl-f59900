// rcpg_traversal -- ray traversal of a regular 3D grid, the stepping core of
// the ray-casting (RCPG) coprocessor case study.
//
// A ray enters the grid in a start cell.  For each axis the block keeps the
// ray parameter at which the ray crosses the next cell face on that axis
// (t_max) and the parameter distance between two faces (t_delta).  Every
// step minimises this cost over the three axes: the axis with the smallest
// t_max is the face the ray leaves through, so the cell index moves by one on
// that axis (direction given by dir_neg) and its t_max grows by its t_delta.
// Ties go to x, then y, then z.  The walk stops at the first occupied cell
// (occ_hit, looked up by the caller at occ_cell in the same cycle) or when
// the ray leaves the grid.
// Interface: a start transfer (start_valid/start_ready) loads the cell and
// the per-axis parameters; every visited cell, the start cell included, is
// given out as one transfer (out_valid/out_ready) with the axis it was
// entered through (out_axis, 3 for the start cell), out_hit for an occupied
// cell and out_last on the final one (hit, or no neighbour inside the grid).
// Timing: one cell per cycle while out_ready is high.
// Follows the design: the cost-minimising step along x, y or z and the stored
// and updated face parameters.  Own choices: integer ray parameters of TW
// bits (the caller keeps t_max + n*t_delta below 2^TW), the tie order and the
// handshake.  The octree levels (descending into a sub-grid, climbing back at
// its border) are not part of this block.
module rcpg_traversal #(
  parameter int unsigned GB = 4,          // grid of 2^GB cells per axis
  parameter int unsigned TW = 16          // width of the ray parameters
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [2:0][GB-1:0] start_cell,  // [0] x, [1] y, [2] z
  input  logic [2:0]        dir_neg,      // 1: the index decreases on that axis
  input  logic [2:0][TW-1:0] t_max0,
  input  logic [2:0][TW-1:0] t_delta,
  output logic [2:0][GB-1:0] occ_cell,    // occupancy lookup of the current cell
  input  logic              occ_hit,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [2:0][GB-1:0] out_cell,
  output logic [1:0]        out_axis,
  output logic              out_hit,
  output logic              out_last
);
  logic              busy;
  logic [2:0][GB-1:0] cur;
  logic [2:0][TW-1:0] tmax, tdel;
  logic [2:0]        neg;
  logic [1:0]        entered;

  // cost minimisation: the axis whose face is crossed first
  logic [1:0] ax;
  always_comb begin
    ax = 2'd0;
    if (tmax[1] < tmax[ax]) ax = 2'd1;
    if (tmax[2] < tmax[ax]) ax = 2'd2;
  end

  logic edge_hit;   // the next step would leave the grid
  assign edge_hit = neg[ax] ? (cur[ax] == '0) : (cur[ax] == '1);

  assign start_ready = !busy;
  assign occ_cell    = cur;
  assign out_valid   = busy;
  assign out_cell    = cur;
  assign out_axis    = entered;
  assign out_hit     = occ_hit;
  assign out_last    = occ_hit || edge_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cur <= '0; tmax <= '0; tdel <= '0; neg <= '0; entered <= 2'd3;
    end else if (!busy) begin
      if (start_valid) begin
        busy <= 1'b1; cur <= start_cell; tmax <= t_max0; tdel <= t_delta;
        neg <= dir_neg; entered <= 2'd3;
      end
    end else if (out_ready) begin
      if (out_last) busy <= 1'b0;
      else begin
        cur[ax] <= neg[ax] ? cur[ax] - 1'b1 : cur[ax] + 1'b1;
        tmax[ax] <= tmax[ax] + tdel[ax];
        entered  <= ax;
      end
    end
  end

endmodule
