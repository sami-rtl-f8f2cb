// sami_pkg: widths, the migration command type and mesh/region helper functions shared by the
// blocks of the self-aware congestion control platform.
//
// Congestion is carried as an unsigned fixed-point rate: one link that carries a packet every
// cycle measures 1 << CONG_FRAC (256). A router level is the sum over its links, a region level
// the sum over its cores. Cores are numbered row-major, core = y * MESH_X + x, and regions the
// same way over the grid of regions. These widths and encodings are this design's choices.
package sami_pkg;

  localparam int unsigned CONG_FRAC = 8;   // fractional bits of a link rate
  localparam int unsigned CONG_W    = 12;  // core congestion level
  localparam int unsigned REG_W     = 16;  // region congestion level (sum of cores)
  localparam int unsigned PID_W     = 24;  // signed controller output

  // A migration order sent to the source and destination Manager Nodes.
  typedef struct packed {
    logic [15:0] task_id;
    logic [15:0] src_core;
    logic [15:0] dst_core;
  } mig_cmd_t;

  // Region of a core for a MESH_X x MESH_Y mesh cut into REG_X x REG_Y equal regions.
  function automatic int unsigned region_of(int unsigned core, int unsigned mesh_x,
                                            int unsigned mesh_y, int unsigned reg_x,
                                            int unsigned reg_y);
    int unsigned x, y;
    x = core % mesh_x;
    y = core / mesh_x;
    return (y / (mesh_y / reg_y)) * reg_x + (x / (mesh_x / reg_x));
  endfunction

  // k-th core (row-major inside the region) of region r.
  function automatic int unsigned region_core(int unsigned r, int unsigned k, int unsigned mesh_x,
                                              int unsigned mesh_y, int unsigned reg_x,
                                              int unsigned reg_y);
    int unsigned w, h;
    w = mesh_x / reg_x;
    h = mesh_y / reg_y;
    return ((r / reg_x) * h + k / w) * mesh_x + (r % reg_x) * w + (k % w);
  endfunction

endpackage
