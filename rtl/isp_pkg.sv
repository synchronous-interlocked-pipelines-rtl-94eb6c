// isp_pkg: shared types for the interlocked synchronous pipeline (ISP) library.
//
// Every storage element of the two-phase pipelines is modelled as a register
// that loads on the clock edge at which the corresponding latch turns opaque.
// Odd-numbered stages close on the rising edge of gclk and even-numbered
// stages on the falling edge, so data advances one stage per clock edge and a
// free-running two-phase pipeline of N stages holds N/2 items. The stall
// register of a stage always loads on the edge opposite to its data register.
// The edge_e type names the edge a register loads on.
package isp_pkg;

  typedef enum logic {
    EDGE_RISE = 1'b0,  // loads on the rising edge of gclk (odd stages)
    EDGE_FALL = 1'b1   // loads on the falling edge of gclk (even stages)
  } edge_e;

  // Edge of the neighbouring stage (adjacent stages always alternate).
  function automatic edge_e other_edge(edge_e e);
    return (e == EDGE_RISE) ? EDGE_FALL : EDGE_RISE;
  endfunction

endpackage
