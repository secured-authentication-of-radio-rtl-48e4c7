// rfid_pkg: message format of the link between the RFID reader and tag.
//
// Every transfer is one clock with valid high and carries a message kind and
// up to two 64-bit words. The kinds follow the exchange of the secured
// authentication: identification request and reply (tag recognition), the
// authentication request, R_1, the challenge Ch_1,2, the response RS_1,2,
// and a reject the tag sends when the reader fails authentication. The
// encoding and the reject are this design's own; the air interface itself is
// outside the design.
package rfid_pkg;

  typedef enum logic [2:0] {
    MSG_REQ_ID   = 3'd0,  // reader -> tag: request identification
    MSG_ID       = 3'd1,  // tag -> reader: w1 = ID, w2 = ENC(ID)
    MSG_REQ_AUTH = 3'd2,  // reader -> tag: request authentication
    MSG_R1       = 3'd3,  // tag -> reader: w1 = R_1
    MSG_CH       = 3'd4,  // reader -> tag: w1,w2 = Ch_1, Ch_2
    MSG_RS       = 3'd5,  // tag -> reader: w1,w2 = RS_1, RS_2
    MSG_REJECT   = 3'd6   // tag -> reader: reader not authenticated
  } msg_kind_e;

  typedef struct packed {
    msg_kind_e   kind;
    logic [63:0] w1;
    logic [63:0] w2;
  } rfid_msg_t;

endpackage
