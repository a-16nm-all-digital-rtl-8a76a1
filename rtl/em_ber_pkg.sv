// em_ber_pkg: constants and types shared by the electromigration bit-error-rate
// monitor. The default sizes are those of the 16 nm test chip: two arrays of 48
// datapaths (96 in total), five buffer/interconnect stages per datapath, a
// 32-bit circular pattern register, 10-bit error counters and a 7-stage ring
// VCO. The scan-chain bit order inside one array is this design's own choice and
// is fixed by the helper functions below.
`timescale 1ps/1ps
package em_ber_pkg;

  localparam int unsigned N_ARRAYS_DEF   = 2;   // left and right array
  localparam int unsigned N_PATHS_DEF    = 48;  // datapaths per array (96 per chip)
  localparam int unsigned N_STAGES_DEF   = 5;   // buffer + wire stages per datapath
  localparam int unsigned PAT_W_DEF      = 32;  // circular pattern register width
  localparam int unsigned CNT_W_DEF      = 10;  // asynchronous error counter width
  localparam int unsigned VCO_STAGES_DEF = 7;   // ring oscillator stages

  // Per-datapath control held in the scan chain.
  typedef struct packed {
    logic meas_en;     // datapath selected for BER measurement
    logic stress_sel;  // datapath selected for DC stress (functional drivers off)
  } path_ctrl_t;

  // Error strobes of one datapath, valid for one clock per transmitted bit.
  typedef struct packed {
    logic err0;        // REF'.DUT : a '0' received as '1'
    logic err1;        // REF.DUT' : a '1' received as '0'
  } err_pair_t;

  // Scan cells per array: pattern, stress polarity, stress selects, measure enables.
  function automatic int unsigned scan_len(int unsigned n_paths, int unsigned pat_w);
    return pat_w + 1 + 2 * n_paths;
  endfunction

  // Cell index (0 = cell next to the array's scan input) of each field.
  function automatic int unsigned pat_idx(int unsigned bit_no);
    return bit_no;
  endfunction
  function automatic int unsigned pol_idx(int unsigned pat_w);
    return pat_w;
  endfunction
  function automatic int unsigned stress_idx(int unsigned pat_w, int unsigned path);
    return pat_w + 1 + path;
  endfunction
  function automatic int unsigned meas_idx(int unsigned pat_w, int unsigned n_paths,
                                           int unsigned path);
    return pat_w + 1 + n_paths + path;
  endfunction

endpackage
