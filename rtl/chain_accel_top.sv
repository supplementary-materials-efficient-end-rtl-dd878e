// chain_accel_top: the chaining accelerator, N independent chaining kernels
// side by side.
//
// Each kernel has its own task control, chaining parameters, anchor input
// stream and result output stream, because the host schedules whole
// chaining tasks onto kernels one at a time and each kernel reads its own
// inputs from and writes its results to device memory. The kernels share
// only the clock and reset. Port arrays are indexed by kernel number.
//
// The kernel-level organisation follows the published description; the number of
// kernels it used is not given, so N = 4 is this design's choice, as are
// M = P = 16 inside each kernel (see chain_kernel).
module chain_accel_top
  import chain_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned M = 16,
  parameter int unsigned P = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start          [N],
  input  logic [31:0]   total_subparts [N],
  input  chain_cfg_t    cfg            [N],
  output logic          busy           [N],
  output logic          done           [N],
  input  logic          in_valid       [N],
  output logic          in_ready       [N],
  input  anchor_t       in_anchor      [N],
  input  logic [31:0]   in_nsub        [N],
  output logic          out_valid      [N],
  input  logic          out_ready      [N],
  output chain_result_t out_result     [N]
);

  for (genvar k = 0; k < int'(N); k++) begin : g_kernel
    chain_kernel #(.M(M), .P(P)) u_kernel (
      .clk, .rst_n,
      .start(start[k]), .total_subparts(total_subparts[k]), .cfg(cfg[k]),
      .busy(busy[k]), .done(done[k]),
      .in_valid(in_valid[k]), .in_ready(in_ready[k]),
      .in_anchor(in_anchor[k]), .in_nsub(in_nsub[k]),
      .out_valid(out_valid[k]), .out_ready(out_ready[k]),
      .out_result(out_result[k])
    );
  end

endmodule
