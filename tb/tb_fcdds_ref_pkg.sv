// tb_fcdds_ref_pkg: reference model of the FCDDS waveforms for the
// testbenches, written directly from the scheme's row and column state
// tables (frame slot F, switching slot S, scan bit R or data bit C ->
// level V0..V3 as a multiple of Vcc/3). It does not use the M/D encoding.
package tb_fcdds_ref_pkg;

  // Row state table, index {F,S,R}.
  localparam int ROW_TABLE [8] = '{1, 1, 1, 3, 2, 2, 2, 0};
  // Column state table, index {F,S,C}.
  localparam int COL_TABLE [8] = '{2, 0, 0, 2, 3, 1, 1, 3};

  function automatic int row_ref(bit f, bit s, bit r);
    return ROW_TABLE[{f, s, r}];
  endfunction

  function automatic int col_ref(bit f, bit s, bit c);
    return COL_TABLE[{f, s, c}];
  endfunction

endpackage
