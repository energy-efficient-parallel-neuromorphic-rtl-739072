// spike_io_buffer: the spike I/O buffer between the UART and the core.
//
// Input side: the external input spikes of one biological step arrive as
// IN_BYTES bytes (input neuron 8b+k is bit k of byte b). Each in_wr stores one
// byte into the fill buffer; in_full rises when the vector is complete.
// in_load copies the fill buffer to the active vector e_vec read by the
// LIF arithmetic units and empties the fill buffer. Because the two are
// separate, the next step's spikes can be received while the core is still
// busy (the spike I/O stage overlaps the learning stage).
//
// Output side: out_cap latches the output-layer firing flags and then sends
// them as OUT_BYTES bytes on a valid/ready byte stream (same bit order);
// out_busy is high until the last byte has been accepted.
module spike_io_buffer #(
  parameter int N_IN      = 784,
  parameter int N_OUT     = 800,
  parameter int IN_BYTES  = (N_IN + 7) / 8,
  parameter int OUT_BYTES = (N_OUT + 7) / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // input spikes
  input  logic              in_wr,
  input  logic [7:0]        in_byte,
  output logic              in_full,
  input  logic              in_load,
  output logic [N_IN-1:0]   e_vec,
  // output spikes
  input  logic              out_cap,
  input  logic [N_OUT-1:0]  s_out,
  output logic              out_busy,
  output logic              tx_valid,
  output logic [7:0]        tx_byte,
  input  logic              tx_ready
);
  logic [IN_BYTES*8-1:0]        fill;
  logic [$clog2(IN_BYTES+1)-1:0] in_ptr;
  logic [OUT_BYTES*8-1:0]        outv;
  logic [$clog2(OUT_BYTES+1)-1:0] out_ptr;

  assign in_full = (int'(in_ptr) == IN_BYTES);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill   <= '0;
      in_ptr <= '0;
      e_vec  <= '0;
    end else if (in_load) begin
      e_vec  <= fill[N_IN-1:0];
      in_ptr <= '0;
    end else if (in_wr && !in_full) begin
      fill[in_ptr*8 +: 8] <= in_byte;
      in_ptr <= in_ptr + 1'b1;
    end
  end

  assign tx_valid = out_busy;
  assign tx_byte  = outv[out_ptr*8 +: 8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      outv     <= '0;
      out_ptr  <= '0;
      out_busy <= 1'b0;
    end else if (out_cap && !out_busy) begin
      outv     <= (OUT_BYTES*8)'(s_out);
      out_ptr  <= '0;
      out_busy <= 1'b1;
    end else if (out_busy && tx_ready) begin
      if (int'(out_ptr) == OUT_BYTES - 1) out_busy <= 1'b0;
      out_ptr <= out_ptr + 1'b1;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_wr && in_full && !in_load));
endmodule
