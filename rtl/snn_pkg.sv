// snn_pkg: types and constants shared by the spiking-network processor.
//
// The network (784 input excitatory neurons, 800 output excitatory neurons,
// 6 input-layer and 1 output-layer inhibitory neurons) and the 32-way
// parallel configuration follow the design description. The word widths are
// derived from its memory sizes: 2,508,800 weight bits for 627,200 plastic
// synapses gives 4-bit weights, 5,017,600 bits for A+ (and for A-) gives
// 8-bit synaptic parameters, and 50,688 neuron-unit flip-flops for 1,584
// excitatory neurons gives 32 bits per neuron (16-bit Vmem, 16-bit Tfire).
// The UART command codes are this design's own.
package snn_pkg;

  localparam int N_IN_DEF  = 784;   // excitatory input-layer neurons (28x28 pixels)
  localparam int N_OUT_DEF = 800;   // excitatory output-layer neurons
  localparam int N_INH_IN  = 6;     // inhibitory neurons of the input layer
  localparam int N_INH_OUT = 1;     // inhibitory neuron of the output layer
  localparam int K_DEF     = 32;    // degree of Loop-I parallelism

  localparam int VW = 16;           // membrane potential width (signed integer)
  localparam int TW = 16;           // firing time / biological time width
  localparam int WW = 4;            // plastic weight width (unsigned)
  localparam int AW = 8;            // A+ / A- width (signed, Q4.4 weight units)
  localparam int MW = 16;           // multiplier operand width (Q8.8)

  typedef logic signed [VW-1:0] vmem_t;
  typedef logic        [TW-1:0] tstamp_t;
  typedef logic        [WW-1:0] weight_t;
  typedef logic signed [AW-1:0] apar_t;

  // LIF arithmetic unit operation, driven by the system controller
  typedef enum logic [1:0] {
    LAU_NOP    = 2'd0,
    LAU_ACC    = 2'd1,   // accumulate one presynaptic weight gated by its spike
    LAU_UPDATE = 2'd2    // write the new membrane potential, clear the accumulator
  } lau_op_e;

  // Host commands (first byte of every frame sent over the UART)
  localparam logic [7:0] CMD_RECOG = 8'h00;  // one biological step, recognition mode
  localparam logic [7:0] CMD_TRAIN = 8'h01;  // one biological step, training mode
  localparam logic [7:0] CMD_DUMP  = 8'h02;  // send all plastic weights back
  localparam logic [7:0] CMD_CLEAR = 8'h03;  // new pattern: reset all membrane state

  // Saturate a wide signed value to a narrower signed range
  function automatic logic signed [VW-1:0] sat_v(input logic signed [VW+3:0] x);
    if (x > $signed((VW+4)'(2**(VW-1)-1)))      return vmem_t'(2**(VW-1)-1);
    else if (x < -$signed((VW+4)'(2**(VW-1))))  return vmem_t'(-(2**(VW-1)));
    else                                         return x[VW-1:0];
  endfunction

endpackage
