// Reciprocal cache: remembers reciprocals computed by the divider.
//
// Direct-mapped, ENTRIES lines. The key is the 52-bit fraction of the divisor
// (the reciprocal's significand depends on nothing else); its low bits index a
// line and the remaining bits are stored as the tag next to a valid bit and
// the DATA_W-bit reciprocal. A lookup is combinational, so a division learns
// in its first cycle whether it can skip the iterations. A write, made when a
// division finishes its iterations, replaces the line. With the defaults the
// cache holds 128 x (1 + 45 + 64) = 14080 bits. Synchronous active-low reset
// invalidates all lines; the data arrays are not reset.
module recip_cache #(
  parameter int ENTRIES = 128,
  parameter int KEY_W   = 52,
  parameter int DATA_W  = 64,
  parameter int IDX_W   = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KEY_W-1:0]  lk_key,
  output logic              lk_hit,
  output logic [DATA_W-1:0] lk_data,
  input  logic              wr_en,
  input  logic [KEY_W-1:0]  wr_key,
  input  logic [DATA_W-1:0] wr_data
);
  localparam int TAG_W = KEY_W - IDX_W;

  logic [ENTRIES-1:0] valid_q;
  logic [TAG_W-1:0]   tag_q  [ENTRIES];
  logic [DATA_W-1:0]  data_q [ENTRIES];

  logic [IDX_W-1:0] lk_idx, wr_idx;
  assign lk_idx = lk_key[IDX_W-1:0];
  assign wr_idx = wr_key[IDX_W-1:0];

  assign lk_hit  = valid_q[lk_idx] & (tag_q[lk_idx] == lk_key[KEY_W-1:IDX_W]);
  assign lk_data = data_q[lk_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_idx]  <= wr_key[KEY_W-1:IDX_W];
      data_q[wr_idx] <= wr_data;
    end
  end

endmodule
