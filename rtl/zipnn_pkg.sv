// zipnn_pkg: shared types and constants of the ZipNN column decoders and
// k-nearest-neighbour engine.
package zipnn_pkg;
  localparam int unsigned LANES   = 8;      // 32-bit values per 256-bit beat
  localparam int unsigned IN_W    = 512;    // compressed input datapath
  localparam int unsigned TOPK_K  = 128;    // entries kept by the sorter
  localparam int unsigned TOPK_W  = 4;      // entries per top-k buffer row
  localparam int unsigned SCORE_FRAC = 8;   // fraction bits of a score

  // Eight 32-bit values with per-lane valid bits; `last` closes a stream.
  typedef struct packed {
    logic [LANES-1:0][31:0] v;
    logic [LANES-1:0]       keep;
    logic                   last;
  } beat_t;

  // One sparse element of a document: <document, word, count>.
  typedef struct packed {
    logic [31:0] doc;
    logic [31:0] word;
    logic [31:0] cnt;
  } tuple_t;

  // Eight merged tuples from the three column decoders.
  typedef struct packed {
    tuple_t [LANES-1:0] t;
    logic   [LANES-1:0] keep;
    logic               last;
  } tbeat_t;

  // A scored document.
  typedef struct packed {
    logic [31:0] score;
    logic [31:0] doc;
  } scored_t;

  // A piece of one document handed from the router to a distance engine:
  // up to eight <word, count> pairs (sorted by word), the document id and a
  // flag closing the document.
  typedef struct packed {
    logic [LANES-1:0][31:0] word;
    logic [LANES-1:0][15:0] cnt;
    logic [LANES-1:0]       keep;
    logic [31:0]            doc;
    logic                   last;
  } seg_t;

  // One query vector memory entry: <word, frequency>.
  typedef struct packed {
    logic [31:0] word;
    logic [15:0] freq;
  } qent_t;
endpackage
