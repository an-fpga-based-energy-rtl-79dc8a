// rm_pkg: types and default sizes shared by the read mapper.
//
// The mapper works on reads of READ_LEN nucleotides, cut into q-grams of
// QGRAM_LEN nucleotides, against genome sections of SECTION_LEN nucleotides.
// A nucleotide is two bits (A=00, C=01, G=10, T=11). A read is packed with
// nucleotide i in bits [2i+1:2i]; a q-gram's value puts its first nucleotide
// in the most significant pair, so sorting q-gram values sorts the strings.
//
// Read length 100 and section size 2048 are the sizes of the published
// system. The q-gram length is not stated there as a number: 16 is what its
// resource table implies (85 search engines for a 100-nucleotide read).
package rm_pkg;

  localparam int unsigned READ_LEN    = 100;
  localparam int unsigned QGRAM_LEN   = 16;
  localparam int unsigned SECTION_LEN = 2048;

  // Derived sizes: M q-grams per read, X q-grams per section.
  localparam int unsigned NUM_QSE     = READ_LEN - QGRAM_LEN + 1;     // M = R - q + 1
  localparam int unsigned NUM_SQA     = SECTION_LEN - QGRAM_LEN + 1;  // X = N - q + 1

  localparam int unsigned READ_ID_W   = 20;

  typedef enum logic [1:0] {
    NT_A = 2'b00,
    NT_C = 2'b01,
    NT_G = 2'b10,
    NT_T = 2'b11
  } nt_t;

  // QSE enable command values that address every engine at once.
  localparam logic [7:0] QSE_CMD_ALL_ON  = 8'hFF;
  localparam logic [7:0] QSE_CMD_ALL_OFF = 8'h00;

endpackage
