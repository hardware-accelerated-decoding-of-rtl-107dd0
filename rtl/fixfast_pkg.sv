// fixfast_pkg: types and constants shared by the FIX/FAST market-data pipeline.
//
// The pipeline moves one 8-bit flit per clock from the Ethernet ports to the
// book builder. This package defines the flit roles, the FAST field operators
// and the three message templates the decoder understands, the book command
// produced by the decoder, and the layout of one order book (BOOK_DEPTH price
// levels on each of the bid and ask sides).
//
// Fixed by the design description: 8-bit flits, 42 header flits (Ethernet,
// IP, UDP), the PMAP flit followed by the template-ID flit at the start of the
// UDP payload, three templates, the update/insert/delete commands, the bid/ask
// level table and the 10-level book depth. Own choices: the field widths, the
// template contents and template IDs, and the number of books.
package fixfast_pkg;

  // ---------------------------------------------------------------- packets
  localparam int unsigned FLIT_W      = 8;
  localparam int unsigned HDR_FLITS   = 42;   // Ethernet 14 + IP 20 + UDP 8
  localparam int unsigned SEQ_W       = 16;   // IP identification field
  localparam int unsigned NUM_CHAN    = 2;    // two Ethernet ports

  typedef logic [SEQ_W-1:0] seq_t;

  // Role of a payload flit, as told by the flit identifier.
  typedef enum logic [1:0] {
    ROLE_PMAP = 2'd0,   // first payload flit: FAST presence map
    ROLE_TID  = 2'd1,   // second payload flit: template ID
    ROLE_DATA = 2'd2    // all later flits: field data
  } flit_role_e;

  // ------------------------------------------------------------------- book
  localparam int unsigned BOOK_DEPTH = 10;    // price levels per side
  localparam int unsigned NUM_BOOKS  = 512;   // symbols held in book memory
  localparam int unsigned BOOK_AW    = $clog2(NUM_BOOKS);
  localparam int unsigned PRICE_W    = 32;    // price in ticks (1/100)
  localparam int unsigned QTY_W      = 32;
  localparam int unsigned CNT_W      = 16;    // order count
  localparam int unsigned LEVEL_W    = $clog2(BOOK_DEPTH + 1);

  typedef enum logic [1:0] {
    CMD_UPDATE = 2'd0,  // overwrite price, quantity, count of a level
    CMD_INSERT = 2'd1,  // insert a level at its place by price
    CMD_DELETE = 2'd2   // remove a level, deeper levels move up
  } cmd_action_e;

  typedef enum logic { SIDE_BID = 1'b0, SIDE_ASK = 1'b1 } side_e;

  typedef struct packed {
    cmd_action_e          action;
    side_e                side;
    logic [BOOK_AW-1:0]   book;     // symbol index = book address
    logic [LEVEL_W-1:0]   level;    // 1-based level (update, delete)
    logic [PRICE_W-1:0]   price;
    logic [QTY_W-1:0]     qty;
    logic [CNT_W-1:0]     count;
  } book_cmd_t;

  typedef struct packed {
    logic                 valid;
    logic [PRICE_W-1:0]   price;
    logic [QTY_W-1:0]     qty;
    logic [CNT_W-1:0]     count;
  } book_level_t;

  // side index 0 = bid (descending price), 1 = ask (ascending price);
  // level index 0 = best price.
  typedef book_level_t [BOOK_DEPTH-1:0] book_side_t;
  typedef book_side_t  [1:0]            book_t;

  // ------------------------------------------------------------------- FAST
  localparam int unsigned MAX_FIELDS = 6;     // fields per template
  localparam int unsigned VAL_W      = 32;    // decoded integer width

  // Field operators. NONE and DELTA fields are always in the stream and use
  // no presence-map bit; COPY and DEFAULT fields use one bit each.
  typedef enum logic [1:0] {
    OP_NONE    = 2'd0,
    OP_COPY    = 2'd1,  // absent: previous value of this field
    OP_DEFAULT = 2'd2,  // absent: template default
    OP_DELTA   = 2'd3   // signed difference to the previous value
  } field_op_e;

  // Destination of a field inside the book command.
  typedef enum logic [2:0] {
    F_BOOK  = 3'd0,
    F_SIDE  = 3'd1,
    F_LEVEL = 3'd2,
    F_PRICE = 3'd3,
    F_QTY   = 3'd4,
    F_COUNT = 3'd5
  } field_dst_e;

  typedef struct packed {
    logic              used;
    field_dst_e        dst;
    field_op_e         op;
    logic [VAL_W-1:0]  dflt;
  } field_spec_t;

  typedef field_spec_t [MAX_FIELDS-1:0] template_t;

  localparam logic [6:0] TID_UPDATE = 7'd1;
  localparam logic [6:0] TID_INSERT = 7'd2;
  localparam logic [6:0] TID_DELETE = 7'd3;

  localparam field_spec_t FNONE = '{used: 1'b0, dst: F_BOOK, op: OP_NONE, dflt: '0};

  // Template 1 -- update a level.
  localparam template_t TMPL_UPDATE = '{
    0: '{used: 1'b1, dst: F_BOOK,  op: OP_COPY,    dflt: 32'd0},
    1: '{used: 1'b1, dst: F_SIDE,  op: OP_DEFAULT, dflt: 32'd0},
    2: '{used: 1'b1, dst: F_LEVEL, op: OP_NONE,    dflt: 32'd0},
    3: '{used: 1'b1, dst: F_PRICE, op: OP_DELTA,   dflt: 32'd0},
    4: '{used: 1'b1, dst: F_QTY,   op: OP_NONE,    dflt: 32'd0},
    5: '{used: 1'b1, dst: F_COUNT, op: OP_DEFAULT, dflt: 32'd1}
  };

  // Template 2 -- insert a level by price.
  localparam template_t TMPL_INSERT = '{
    0: '{used: 1'b1, dst: F_BOOK,  op: OP_COPY,    dflt: 32'd0},
    1: '{used: 1'b1, dst: F_SIDE,  op: OP_NONE,    dflt: 32'd0},
    2: '{used: 1'b1, dst: F_PRICE, op: OP_DELTA,   dflt: 32'd0},
    3: '{used: 1'b1, dst: F_QTY,   op: OP_NONE,    dflt: 32'd0},
    4: '{used: 1'b1, dst: F_COUNT, op: OP_DEFAULT, dflt: 32'd1},
    5: FNONE
  };

  // Template 3 -- delete a level.
  localparam template_t TMPL_DELETE = '{
    0: '{used: 1'b1, dst: F_BOOK,  op: OP_COPY,    dflt: 32'd0},
    1: '{used: 1'b1, dst: F_SIDE,  op: OP_NONE,    dflt: 32'd0},
    2: '{used: 1'b1, dst: F_LEVEL, op: OP_NONE,    dflt: 32'd0},
    3: FNONE,
    4: FNONE,
    5: FNONE
  };

endpackage
