// direct_pkg: types and constants shared by the DIRECT back-end RTL.
//
// The page size (16K bytes, a 14-bit address), the 8-bit byte carried over a
// 1-bit serial path, the three relation lock states and the two lock values
// of a page request follow the document. The request/reply encodings, the
// width of the identifiers and the RELEASE request are choices of this design.
package direct_pkg;


  // Relation lock field of the relation address translation table.
  typedef enum logic [1:0] {
    REL_UNLOCKED = 2'd0,
    REL_IN_USE   = 2'd1,
    REL_LOCKED   = 2'd2
  } rel_lock_e;

  // Controller request opcodes.
  typedef enum logic [1:0] {
    OP_NEXTPAGE = 2'd0,  // next page of a relation, per query packet currency pointer
    OP_GETPAGE  = 2'd1,  // a given page of a relation
    OP_RELEASE  = 2'd2   // query packet has finished with a relation
  } ctl_op_e;

  // LOCK-VALUE of a NEXTPAGE/GETPAGE request.
  typedef enum logic {
    LV_RETRIEVE = 1'b0,
    LV_UPDATE   = 1'b1
  } lock_val_e;

  // Identifier widths of the controller interface (wide enough for the
  // default table sizes of bec_page_manager).
  localparam int unsigned PKT_W   = 3;  // query packet number
  localparam int unsigned REL_W   = 4;  // relation number
  localparam int unsigned PAGE_W  = 6;  // page number within a relation
  localparam int unsigned FRAME_W = 5;  // CCD page frame number

  // Request from a query processor to the back-end controller. The query
  // processor holds req_valid and the fields until the reply arrives.
  typedef struct packed {
    logic                req_valid;
    ctl_op_e             op;
    logic [PKT_W-1:0]    pkt;
    logic [REL_W-1:0]    rel;
    logic [PAGE_W-1:0]   page;    // GETPAGE only
    lock_val_e           lock_val;
  } ctl_req_t;

  // SEND: the controller's reply to one query processor.
  typedef struct packed {
    logic                 rep_valid;  // one-cycle pulse
    logic                 eor;        // end of relation: no such page
    logic [FRAME_W-1:0]   frame;      // page frame holding the page
    logic [PAGE_W-1:0]    page;       // page number that was resolved
  } ctl_rep_t;

endpackage
