// pfir_pkg: constants and types shared by the parallel FIR modules.
//
// The widths are those of the DSP48E2 slice that the structures are mapped
// onto: a 27-bit pre-adder / multiplier A port, an 18-bit multiplier B port
// and a 48-bit post-adder (P). The FIR sub-filter structure is chosen at
// elaboration time with fir_struct_e: the systolic form (data cascaded
// through the slices, no fan-out, latency grows with the tap count) or the
// transposed form (data broadcast to every slice, fixed latency).
package pfir_pkg;

  localparam int DSP_A_W = 27;  // pre-adder / multiplier A input
  localparam int DSP_B_W = 18;  // multiplier B input
  localparam int DSP_P_W = 48;  // post-adder (ALU) and cascade width

  typedef enum logic [0:0] {
    FIR_SYSTOLIC   = 1'b0,
    FIR_TRANSPOSED = 1'b1
  } fir_struct_e;

  // Latency, in clock cycles, from a sample at a FIR's input port to the
  // first output that contains it, for a FIR of `taps` taps.
  function automatic int fir_latency(fir_struct_e s, int taps);
    return (s == FIR_SYSTOLIC) ? taps + 2 : 3;
  endfunction

endpackage
