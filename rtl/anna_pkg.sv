// anna_pkg: constants and types shared by the magnetostrictive readout system.
//
// The system records, for every magnetostrictive wand, the 16-bit time count of
// each spark (up to 15 per wand) in a small fast memory in a 4-channel time
// digitizer module ("ANNA"), and a processor later reads all modules through the
// CAMAC dataway and packs the data into 32-bit computer words.
//
// From the document: 20 MHz clock, 16-bit time words, 16x16 memory per wand,
// 4-bit address counter, 15 sparks per wand, 4 channels per module, a 16x64 bit
// word-counter memory in the processor, 32-bit computer words carrying a wand
// address, up to 7 crates.
// Own choices: the CAMAC function codes of the module, the layout of the 32-bit
// word (the document's word-format figure is not reproduced here), the 24-bit
// read bus and the clocked dataway strobes.
package anna_pkg;

  localparam int unsigned TIME_W       = 16;  // time word / synchronous counter width
  localparam int unsigned ADDR_W       = 4;   // memory address (ripple counter) width
  localparam int unsigned MEM_DEPTH    = 16;  // words per wand memory
  localparam int unsigned MAX_SPARKS   = 15;  // sparks per wand before the input is gated off
  localparam int unsigned CHANNELS     = 4;   // wands per ANNA module
  localparam int unsigned CAMAC_R_W    = 24;  // CAMAC read lines R1..R24
  localparam int unsigned MAX_CRATES   = 7;   // limit of the crate controller
  localparam int unsigned WAND_IDX_W   = 8;   // 256 word counters = 16 x 64 bits of 4 bits

  // CAMAC function codes decoded by the ANNA module (own assignment, standard
  // CAMAC meaning: F0..F7 are reads).
  typedef enum logic [4:0] {
    F_READ_DATA  = 5'd0,   // read memory word at the channel's read pointer, Q = word non-zero
    F_READ_COUNT = 5'd1    // read the channel's word counter (number of sparks recorded)
  } camac_func_e;

  // One dataway command, as the processor puts it on a crate.
  typedef struct packed {
    logic [2:0] crate;     // crate number 0..6
    logic [4:0] n;         // station number 1..23
    logic [3:0] a;         // subaddress A0..A15 (channel 0..3 used)
    logic [4:0] f;         // function code
    logic       s1;        // strobe S1: read data sampled
    logic       s2;        // strobe S2: module acts (pointer increment)
  } camac_cmd_t;

  // Wand address carried in each data word.
  typedef struct packed {
    logic [2:0] crate;
    logic [4:0] n;
    logic [1:0] a;
  } wand_addr_t;

  // 32-bit computer data word.
  typedef struct packed {
    logic       header;    // 1 = first word of the event (spark total), 0 = data word
    logic       q_err;     // Q line did not behave as the word counter predicts
    logic       fid_err;   // fewer than 2 words (fiducials) on this wand
    logic       ovf_err;   // word counter overflow (15 sparks, later sparks lost)
    logic [1:0] spare;
    wand_addr_t addr;      // wand address (zero in the header word)
    logic [15:0] data;     // time count, or the spark total in the header word
  } cpu_word_t;

endpackage
