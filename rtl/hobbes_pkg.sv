// hobbes_pkg: types and constants shared by the deterministic batch
// transaction processor.
//
// A transaction is a single-field YCSB operation: read or write one 64-byte
// field (column) of one record.  Records have 8 fields, so the table is an
// array of 512-bit words and field (key, col) lives at word key*8 + col.
// Transaction and result objects are padded to two 512-bit memory words
// (1024 bits): a header word followed by the 512-bit field value, so every
// object access is a full, aligned memory word.  The 8 fields, 64-byte field
// size, 512-bit memory word and 1024-bit objects follow the published design;
// the widths of the id and key fields and the header layout are this
// implementation's own choice.
package hobbes_pkg;

  // Memory word and field size (64 bytes).
  localparam int unsigned FIELD_W   = 512;
  localparam int unsigned MEM_W     = 512;
  // Fields per record.
  localparam int unsigned NUM_COLS  = 8;
  localparam int unsigned COL_W     = $clog2(NUM_COLS);
  // Transaction id and record key widths.
  localparam int unsigned ID_W      = 32;
  localparam int unsigned KEY_W     = 32;
  // Global memory word address width: 2^26 words of 64 bytes = 4 GiB,
  // the two 2 GB DDR3 modules of the board.
  localparam int unsigned ADDR_W    = 26;

  typedef logic [FIELD_W-1:0] field_t;
  typedef logic [ADDR_W-1:0]  maddr_t;

  typedef enum logic {
    TXN_READ  = 1'b0,
    TXN_WRITE = 1'b1
  } txn_type_e;

  // Transaction object.
  typedef struct packed {
    logic [ID_W-1:0]  id;
    txn_type_e        ttype;
    logic [KEY_W-1:0] key;
    logic [COL_W-1:0] col;
    field_t           value;
  } txn_t;

  localparam int unsigned TXN_HDR_W = ID_W + 1 + KEY_W + COL_W;

  // Result object.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            success;
    field_t          value;
  } result_t;

  // One global-memory request: a whole-word read or write.
  typedef struct packed {
    logic   we;
    maddr_t addr;
    field_t wdata;
  } mem_req_t;

  // Header word layouts (low bits of the first 512-bit word of an object).
  function automatic field_t pack_txn_hdr(txn_t t);
    field_t w;
    w = '0;
    w[TXN_HDR_W-1:0] = {t.id, t.ttype, t.key, t.col};
    return w;
  endfunction

  function automatic txn_t unpack_txn(field_t hdr, field_t val);
    txn_t t;
    {t.id, t.ttype, t.key, t.col} = hdr[TXN_HDR_W-1:0];
    t.value = val;
    return t;
  endfunction

  function automatic field_t pack_res_hdr(result_t r);
    field_t w;
    w = '0;
    w[ID_W:0] = {r.id, r.success};
    return w;
  endfunction

  // Word address of field (key, col) relative to the table base.
  function automatic maddr_t table_offset(logic [KEY_W-1:0] key, logic [COL_W-1:0] col);
    return maddr_t'({key, col});
  endfunction

endpackage
