// mfr_pkg - types and constants shared by the multifunctional register (MFR).
//
// The MFR is a p-bit register that can hold, reset, load in parallel, shift
// left or right, and count up or down. Which operation wins when several
// command inputs are active at once is fixed by a priority order. Two orders
// are provided:
//   ORDER_PE_SH_CE : SR > PE > SH > CE  (load first, counting last)
//   ORDER_CE_SH_PE : SR > CE > SH > PE  (counting first, load last)
// Both orders and their truth tables come from the design description; the
// enum encoding, the command struct and the names are this design's own.
//
// The package also holds the worst-case timing model of a discrete TTL build
// of the register (74LS74A flip-flops, 74LS08 AND, 74LS86 XOR and 2:1
// multiplexers made of 74LS126A tri-state buffers). The worst path is the
// count path: flip-flop clock-to-Q, the ripple AND chain that decides
// whether bit i toggles, one XOR, then every multiplexer between the XOR and
// the flip-flop D input, plus set-up time. The delays are the data-book
// maxima quoted in the description. The functions are elaboration-time
// constants only; they describe no hardware.
package mfr_pkg;

  typedef enum logic {
    ORDER_PE_SH_CE = 1'b0,   // priority SR, PE, SH, CE
    ORDER_CE_SH_PE = 1'b1    // priority SR, CE, SH, PE
  } mfr_order_e;

  // Synchronous command inputs of one register, all as seen on the pins.
  typedef struct packed {
    logic pe_n;   // parallel enable, active low
    logic sh;     // shift enable
    logic ce;     // count enable
    logic l_rn;   // shift direction: 1 = left (towards MSB), 0 = right
    logic u_dn;   // count direction: 1 = up, 0 = down
  } mfr_cmd_t;

  // Worst-case propagation delays in ns (74LS family data-book maxima).
  localparam int unsigned T_MUX_NS  = 15;  // 2:1 mux, data input to output
  localparam int unsigned T_AND_NS  = 20;  // one 74LS08 gate of the carry chain
  localparam int unsigned T_XOR_NS  = 30;  // 74LS86 gate
  localparam int unsigned T_CQ_NS   = 40;  // 74LS74A clock to Q (max of tPLH, tPHL)
  localparam int unsigned T_SU_NS   = 20;  // 74LS74A D set-up time

  // Multiplexers passed by the count path from the XOR to D.
  function automatic int unsigned count_path_muxes(mfr_order_e order);
    return (order == ORDER_PE_SH_CE) ? 4 : 2;
  endfunction

  // Minimum clock period for a register whose carry chain is `ranks` AND
  // gates long: T = tsu + tCQ + ranks*tAND + tXOR + n*tMUX.
  function automatic int unsigned min_period_ns(mfr_order_e order, int unsigned ranks);
    return T_SU_NS + T_CQ_NS + ranks * T_AND_NS + T_XOR_NS
           + count_path_muxes(order) * T_MUX_NS;
  endfunction

endpackage
