// synapse_rw_if: synapse read/write interface between the compute units and
// the K single-port weight banks.
//
// During the neuron operation stage (los_sel=0) all K banks are read at the
// same address nos_addr and bank k feeds LIF arithmetic unit k: the K-way
// parallel weight readout of the Loop-I architecture. During the learning
// operation stage or a weight dump (los_sel=1) a single bank, chosen by
// los_bank, is read and written at los_addr; its read data is returned on
// los_rdata one cycle later (the bank index is registered to match the
// memory's read latency). Writes are only possible through the LOS side.
module synapse_rw_if
  import snn_pkg::*;
#(
  parameter int K     = K_DEF,
  parameter int WAW   = 15,
  parameter int BANKW = (K > 1) ? $clog2(K) : 1
) (
  input  logic             clk,
  input  logic             los_sel,
  // neuron operation stage side
  input  logic [WAW-1:0]   nos_addr,
  output weight_t          nos_rdata [K],
  // learning operation stage side
  input  logic [BANKW-1:0] los_bank,
  input  logic [WAW-1:0]   los_addr,
  input  logic             los_we,
  input  weight_t          los_wdata,
  output weight_t          los_rdata,
  // to / from the banks
  output logic [WAW-1:0]   bank_addr [K],
  output logic             bank_we   [K],
  output weight_t          bank_wdata,
  input  weight_t          bank_rdata [K]
);
  logic [BANKW-1:0] bank_q;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      bank_addr[k] = los_sel ? los_addr : nos_addr;
      bank_we[k]   = los_sel && los_we && (int'(los_bank) == k);
      nos_rdata[k] = bank_rdata[k];
    end
    bank_wdata = los_wdata;
    los_rdata  = bank_rdata[bank_q];
  end

  always_ff @(posedge clk) bank_q <= los_bank;
endmodule
