// neuroaix_pkg: types and constants shared by the neuromorphic node.
//
// A network packet is 128 bits wide, the size given for spike and
// synchronization messages. Its field layout is this design's own choice.
// Neurons are named inside a node by a 12-bit local id {worker[3:0], slot[7:0]};
// the 8-bit slot explains the limit of 255 neurons per worker. A synapse word
// is 64 bits: 16-bit target id, 8-bit delay, 32-bit fixed-point weight and
// 8 spare bits, i.e. 8 bytes per synapse. Eight synapses form one 512-bit
// memory beat; word 0 of every padded synaptic list holds the list length.
package neuroaix_pkg;

  localparam int unsigned PKT_W      = 128;
  localparam int unsigned TS_W       = 16;   // timestep counter width
  localparam int unsigned LID_W      = 12;   // node-local neuron id {worker, slot}
  localparam int unsigned WGT_W      = 32;   // Q16.16 fixed point
  localparam int unsigned SYN_W      = 64;
  localparam int unsigned SYN_PER_BEAT = 8;
  localparam int unsigned BEAT_W     = SYN_W * SYN_PER_BEAT;  // 512
  localparam int unsigned MADDR_W    = 32;   // memory address in beats

  typedef enum logic [1:0] {
    PKT_SPIKE  = 2'd0,
    PKT_SYNC   = 2'd1,
    PKT_CONFIG = 2'd2,
    PKT_NONE   = 2'd3
  } pkt_type_e;

  // Neuron state fields reachable by configuration packets.
  typedef enum logic [2:0] {
    FLD_V    = 3'd0,   // membrane potential
    FLD_IEX  = 3'd1,   // excitatory synaptic current
    FLD_IIN  = 3'd2,   // inhibitory synaptic current
    FLD_REF  = 3'd3,   // remaining refractory steps
    FLD_IDC  = 3'd4    // external DC stimulus
  } cfg_field_e;

  typedef struct packed {
    pkt_type_e         typ;       // 2
    logic              fwd;       // 1: broadcast stage 2 (already forwarded once)
    logic              sync_lvl;  // 1: 0 = first, 1 = second synchronization
    logic [3:0]        src_x;     // 4
    logic [3:0]        src_y;     // 4
    logic [3:0]        dst_x;     // 4  (configuration packets)
    logic [3:0]        dst_y;     // 4
    logic [TS_W-1:0]   ts;        // 16: timestep of origin
    logic [LID_W-1:0]  neuron;    // 12: source neuron (spike) / target neuron (config)
    cfg_field_e        field;     // 3
    logic [31:0]       data;      // 32: configuration value
    logic [44:0]       spare;     // 45
  } packet_t;

  typedef struct packed {
    logic [15:0]       target;    // {worker[7:0], slot[7:0]}
    logic [7:0]        delay;     // timesteps
    logic [7:0]        spare;
    logic [WGT_W-1:0]  weight;    // signed Q16.16
  } synapse_t;

  // One synaptic input on its way to a ring buffer.
  typedef struct packed {
    logic [7:0]        slot;
    logic [TS_W-1:0]   ts;        // timestep the input takes effect
    logic [WGT_W-1:0]  weight;
  } syn_in_t;

  // Model constants of the LIF neuron with current-based exponential
  // synapses, in the exact-integration (propagator) form. All Q16.16 except
  // t_ref, which counts timesteps.
  typedef struct packed {
    logic signed [31:0] p22;      // membrane decay over one step
    logic signed [31:0] p21ex;    // excitatory current -> potential
    logic signed [31:0] p21in;    // inhibitory current -> potential
    logic signed [31:0] p20;      // DC current -> potential
    logic signed [31:0] p11ex;    // excitatory current decay
    logic signed [31:0] p11in;    // inhibitory current decay
    logic signed [31:0] theta;    // threshold (relative to resting potential)
    logic signed [31:0] v_reset;  // reset potential
    logic        [7:0]  t_ref;    // refractory period in steps
  } lif_param_t;

  function automatic logic signed [31:0] qmul(input logic signed [31:0] a,
                                              input logic signed [31:0] b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return p[47:16];
  endfunction

endpackage
