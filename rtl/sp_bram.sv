// sp_bram: single-port block RAM with synchronous read (read-first).
//
// Used for the plastic weight banks (4-bit words) and for the A+ and A-
// synaptic parameter memories (8-bit words). One access per cycle: the word
// at addr appears on rdata one cycle later; with we=1 wdata is written at the
// same edge and rdata returns the old word. Initial contents (FPGA block RAMs
// are configured with them) are either the constant INIT or, with
// INIT_RANDOM=1, a fixed hash of the address masked to INIT_MASK and offset
// by INIT, so that the plastic weights start from distinct values.
// The initialisation scheme is this design's own choice.
module sp_bram #(
  parameter int          DEPTH       = 19600,
  parameter int          WIDTH       = 4,
  parameter int          AWID        = $clog2(DEPTH),
  parameter logic [31:0] INIT        = 32'd0,
  parameter bit          INIT_RANDOM = 1'b0,
  parameter logic [31:0] INIT_MASK   = 32'h7,
  parameter logic [31:0] SALT        = 32'h9E37_79B9
) (
  input  logic             clk,
  input  logic [AWID-1:0]  addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  function automatic logic [WIDTH-1:0] init_word(input int unsigned a);
    logic [31:0] h;
    h = (a + SALT) * 32'h2C1B_3C6D;
    h = h ^ (h >> 15);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 12);
    return INIT_RANDOM ? WIDTH'(INIT + (h & INIT_MASK)) : WIDTH'(INIT);
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = init_word(i);
  end

  always_ff @(posedge clk) begin
    if (int'(addr) < DEPTH) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end else begin
      rdata <= '0;
    end
  end
endmodule
