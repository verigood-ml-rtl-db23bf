// Axiline shared definitions: the algorithms the three-stage pipeline can be
// generated for. Stage 2 (the combinational function) is the only part that
// differs between them.
package axl_pkg;

  typedef enum logic [1:0] {
    ALG_LINREG = 2'd0,   // linear regression:   g = lr * (s - y)
    ALG_LOGREG = 2'd1,   // logistic regression: g = lr * (sigmoid(s) - y)
    ALG_SVM    = 2'd2    // linear SVM (hinge):  g = -lr * y if y * s < 1, else 0
  } axl_alg_e;

endpackage
