// pow2_scaler: programmable power-of-two scaler for signed RNS numbers.
//
// Divides a signed number v, given by its residues over the base
// {13, 17, 29, 37, 41, 53} (|v| <= (M-1)/2, M = 515290009), by 2^n with
// n = shift in 1..N_STAGES, entirely in the residue domain, with a
// rounding error of at most 1/2: the result is
//   v' = floor(ceil(v / 2^(n-1)) / 2),
// which is v / 2^n rounded to the nearest integer, ties rounded down
// (for n = 1 every odd v is a tie).
//
// Structure: a fractional-CRT base extension adds the redundant residue
// x mod 5 (two cycles); then a chain of N_STAGES scale-by-2 blocks follows,
// N_STAGES-1 basic ones (odd values rounded up) and a last one with error
// correction (odd values rounded down). A multiplexer in front of each
// block selects its input: the previous block's output, or the extended
// input when that block is the entry point N_STAGES - n. The number thus
// passes through exactly n blocks and always leaves through the
// correcting one. Latency is n + 2 cycles, throughput one number per
// cycle. The seven-block chain, the input routing multiplexers, the
// correction in the last block and the n + 2 latency follow the published
// design; the register per block and the valid signal are this design's.
//
// shift is a configuration input: it must be in 1..N_STAGES while numbers
// are in flight and is read when a number leaves the base extension, two
// cycles after in_valid. Changing it while numbers are in the chain loses
// or corrupts those numbers.
//
// Ports: clk; rst_n (synchronous, active low, clears the valid pipeline);
// shift; in_valid / in_res (base residues); out_valid / out_res / out_xr
// (scaled base residues and the scaled value's residue mod 5).
module pow2_scaler
  import rns_pkg::*;
#(
  parameter int N_STAGES = 7,
  localparam int SHW = $clog2(N_STAGES + 1)
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [SHW-1:0] shift,
  input  logic           in_valid,
  input  rns_t           in_res,
  output logic           out_valid,
  output rns_t           out_res,
  output rres_t          out_xr
);

  // base extension
  logic  ext_v;
  rns_t  ext_x;
  rres_t ext_xr;

  frac_crt_base_ext u_ext (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_x(in_res),
    .out_valid(ext_v), .out_x(ext_x), .out_xr(ext_xr)
  );

  // chain of scale-by-2 blocks with input routing
  logic  st_in_v  [N_STAGES];
  rns_t  st_in_x  [N_STAGES];
  rres_t st_in_xr [N_STAGES];
  logic  st_out_v [N_STAGES];
  rns_t  st_out_x [N_STAGES];
  rres_t st_out_xr[N_STAGES];

  for (genvar j = 0; j < N_STAGES; j++) begin : g_stage
    logic entry;
    assign entry = (int'(shift) == N_STAGES - j);

    if (j == 0) begin : g_first
      assign st_in_v[j]  = entry & ext_v;
      assign st_in_x[j]  = ext_x;
      assign st_in_xr[j] = ext_xr;
    end else begin : g_next
      assign st_in_v[j]  = entry ? ext_v  : st_out_v[j-1];
      assign st_in_x[j]  = entry ? ext_x  : st_out_x[j-1];
      assign st_in_xr[j] = entry ? ext_xr : st_out_xr[j-1];
    end

    if (j < N_STAGES - 1) begin : g_basic
      scale2_stage u_s2 (
        .clk(clk), .rst_n(rst_n),
        .in_valid(st_in_v[j]), .in_x(st_in_x[j]), .in_xr(st_in_xr[j]),
        .out_valid(st_out_v[j]), .out_x(st_out_x[j]), .out_xr(st_out_xr[j])
      );
    end else begin : g_last
      scale2_last u_s2 (
        .clk(clk), .rst_n(rst_n),
        .in_valid(st_in_v[j]), .in_x(st_in_x[j]), .in_xr(st_in_xr[j]),
        .out_valid(st_out_v[j]), .out_x(st_out_x[j]), .out_xr(st_out_xr[j])
      );
    end
  end

  assign out_valid = st_out_v[N_STAGES-1];
  assign out_res   = st_out_x[N_STAGES-1];
  assign out_xr    = st_out_xr[N_STAGES-1];

  // the exponent must select one of the blocks when a number enters
  always_ff @(posedge clk)
    if (rst_n && ext_v)
      assert (shift >= 1 && int'(shift) <= N_STAGES)
        else $error("pow2_scaler: shift %0d out of range 1..%0d", shift, N_STAGES);

endmodule
