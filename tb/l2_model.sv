// l2_model: behavioural model of the next cache level (L2), for testbenches
// only. It is assumed error free. Requests are held by the cache with
// `req_valid` until `resp_valid`, which this model raises LAT cycles after the
// request appears. Reads return a whole line; writes update only the words
// selected by `req_wmask`. Lines never written hold a fixed pattern derived
// from their address (see init_word), with every fifth word zero.
module l2_model #(
  parameter int unsigned LADDR_W = 42,
  parameter int unsigned WORDS   = 8,
  parameter int unsigned WW      = 64,
  parameter int unsigned LAT     = 3
) (
  input  logic                  clk,
  input  logic                  req_valid,
  input  logic                  req_we,
  input  logic [LADDR_W-1:0]    req_addr,
  input  logic [WORDS*WW-1:0]   req_wdata,
  input  logic [WORDS-1:0]      req_wmask,
  output logic                  resp_valid,
  output logic [WORDS*WW-1:0]   resp_rdata
);
  logic [WW-1:0] mem [logic [LADDR_W+7:0]];
  int unsigned   cnt = 0;
  int unsigned   n_reads = 0, n_writes = 0, n_words_written = 0;
  logic [WORDS-1:0] last_mask;

  function automatic logic [WW-1:0] init_word(input logic [LADDR_W-1:0] a, input int k);
    logic [63:0] v;
    if (((a + LADDR_W'(k)) % 5) == 0) return '0;
    v = {a[31:0] ^ 32'h5A5A_0000, 24'h0, 8'(k)} * 64'h9E37_79B9_7F4A_7C15;
    return WW'(v);
  endfunction

  function automatic logic [WW-1:0] peek(input logic [LADDR_W-1:0] a, input int k);
    logic [LADDR_W+7:0] key;
    key = {a, 8'(k)};
    return mem.exists(key) ? mem[key] : init_word(a, k);
  endfunction

  assign resp_valid = req_valid && cnt == LAT;
  always_comb
    for (int k = 0; k < WORDS; k++) resp_rdata[k*WW +: WW] = peek(req_addr, k);

  always @(posedge clk) begin
    if (!req_valid || resp_valid) cnt <= 0;
    else                          cnt <= cnt + 1;
    if (resp_valid) begin
      if (req_we) begin
        n_writes++;
        last_mask = req_wmask;
        for (int k = 0; k < WORDS; k++)
          if (req_wmask[k]) begin
            mem[{req_addr, 8'(k)}] = req_wdata[k*WW +: WW];
            n_words_written++;
          end
      end else n_reads++;
    end
  end
endmodule
