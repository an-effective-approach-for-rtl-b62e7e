// msic_pkg: types and constants shared by the MSIC built-in self-test.
//
// The BIST has two ways of applying patterns: test-per-scan, in which the
// pattern generator shifts one column of the MSIC matrix into the scan chains
// per clock and the circuit under test captures once per vector, and
// test-per-clock, in which the whole matrix is applied in parallel every clock.
// The codeword that is XORed with the LFSR seed is either the plain Johnson
// codeword or its Gray-coded form.
package msic_pkg;

  // How patterns are applied to the circuit under test.
  typedef enum logic {
    MODE_PER_SCAN  = 1'b0,
    MODE_PER_CLOCK = 1'b1
  } test_mode_e;

  // Which SIC codeword feeds the XOR network.
  typedef enum logic {
    CODE_JOHNSON = 1'b0,
    CODE_GRAY    = 1'b1
  } code_sel_e;

  // States of the BIST test controller.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for BIST Start
    ST_INIT    = 3'd1,  // Johnson counter cleared in shift-register mode
    ST_SHIFT   = 3'd2,  // one scan column per clock (test-per-scan)
    ST_CAPTURE = 3'd3,  // scan enable low, circuit captures its response
    ST_PCLOCK  = 3'd4,  // one full vector per clock (test-per-clock)
    ST_UNLOAD  = 3'd5,  // last responses shifted out into the analyzer
    ST_CHECK   = 3'd6,  // signature compared with the expected one
    ST_DONE    = 3'd7   // BIST Done held until BIST Start falls
  } bist_state_e;

endpackage
